// tb_register_file: checks reset to zero, then random writes and reads of
// the four registers on both read ports against a shadow model, including
// that a disabled write changes nothing.
module tb_register_file;
  logic clk = 0, rst, we;
  logic [1:0] s0, s1, ws;
  logic [7:0] p0, p1, wd;
  logic [7:0] regs [4];
  logic [7:0] shadow [4];
  int checks = 0, failures = 0;

  register_file dut (.clk, .rst, .port0_select(s0), .port1_select(s1), .port0(p0), .port1(p1),
                     .write_enable(we), .write_select(ws), .write_data(wd), .regs);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int r = 0; r < 4; r++) begin
      s0 = 2'(r); s1 = 2'(3 - r); #1;
      checks += 3;
      if (p0 !== shadow[r] || p1 !== shadow[3 - r] || regs[r] !== shadow[r]) begin
        failures++;
        $display("FAIL reg %0d: port0=%h port1=%h regs=%h expected %h/%h", r, p0, p1, regs[r],
                 shadow[r], shadow[3 - r]);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; ws = 0; wd = 0; s0 = 0; s1 = 0;
    @(posedge clk); #1; rst = 0;
    shadow = '{default: 8'h00};
    check_all();
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); ws = 2'($urandom); wd = 8'($urandom);
      @(posedge clk); #1;
      if (we) shadow[ws] = wd;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
