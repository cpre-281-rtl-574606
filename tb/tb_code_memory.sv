// tb_code_memory: fills all 64 words, reads them back through the
// asynchronous read port, then mixes random writes and reads against a
// shadow array; checks that a word reads its new value the cycle after it
// is written and that wr_en = 0 leaves memory unchanged.
module tb_code_memory;
  logic clk = 0, we;
  logic [5:0] ra, wa;
  logic [15:0] instr, wd;
  logic [15:0] shadow [64];
  int checks = 0, failures = 0;

  code_memory dut (.clk, .rd_addr(ra), .instr, .wr_en(we), .wr_addr(wa), .wr_data(wd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(logic [5:0] a);
    ra = a; #1;
    checks++;
    if (instr !== shadow[a]) begin
      failures++;
      $display("FAIL addr %0d: %h expected %h", a, instr, shadow[a]);
    end
  endtask

  initial begin
    we = 0; ra = 0; wa = 0; wd = 0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1; wa = 6'(a); wd = 16'($urandom); shadow[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 64; a++) check_read(6'(a));
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 6'($urandom); wd = 16'($urandom);
      @(posedge clk); #1;
      if (we) shadow[wa] = wd;
      check_read(wa);
      check_read(6'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
