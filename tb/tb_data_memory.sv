// tb_data_memory: writes every byte, reads it back on both read ports, then
// mixes random writes and reads against a shadow array (16 bytes).
module tb_data_memory;
  logic clk = 0, we;
  logic [3:0] addr, dbg_addr;
  logic [7:0] rd, wd, dbg;
  logic [7:0] shadow [16];
  int checks = 0, failures = 0;

  data_memory dut (.clk, .addr, .rd_data(rd), .wr_en(we), .wr_data(wd), .dbg_addr, .dbg_data(dbg));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [3:0] a, logic [3:0] d);
    addr = a; dbg_addr = d; #1;
    checks += 2;
    if (rd !== shadow[a]) begin
      failures++;
      $display("FAIL read %0d: %h expected %h", a, rd, shadow[a]);
    end
    if (dbg !== shadow[d]) begin
      failures++;
      $display("FAIL debug read %0d: %h expected %h", d, dbg, shadow[d]);
    end
  endtask

  initial begin
    we = 0; addr = 0; wd = 0; dbg_addr = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; addr = 4'(a); wd = 8'($urandom); shadow[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 16; a++) check(4'(a), 4'(15 - a));
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] wa;
      @(negedge clk);
      wa = 4'($urandom);
      we = 1'($urandom); addr = wa; wd = 8'($urandom);
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
      we = 0;
      check(wa, 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
