// tb_pc_logic: drives random mux, write-enable and offset values and
// compares the PC after every rising edge with a model of the i281 PC
// rule: next = PC + 1, or PC + 1 + offset (6-bit, two's complement, wraps
// modulo 64) when the mux is 1; the PC holds while write enable is 0.
// Also checks the reset value and the two worked JUMP/BRG examples of the
// sum-to-5 program (offsets -5 and +3 from addresses 39 and 36).
module tb_pc_logic;
  logic clk = 0, rst, we, mux;
  logic [5:0] offset, pc, pc_plus1, pc_next;
  logic [5:0] model;
  int checks = 0, failures = 0;

  pc_logic #(.START_PC(6'd32)) dut (.clk, .rst, .pc_write_enable(we), .pc_mux(mux),
                                    .offset, .pc, .pc_plus1, .pc_next);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_pc(logic [5:0] exp, string what);
    checks++;
    if (pc !== exp) begin
      failures++;
      $display("FAIL %s: pc=%0d expected %0d", what, pc, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; mux = 0; offset = 0;
    @(posedge clk); #1;
    expect_pc(6'd32, "reset");
    model = 6'd32;
    rst = 0;
    // Worked examples: JUMP Loop at 39 with offset 111011 goes to 35;
    // BRG End at 36 with offset 000011 goes to 40.
    we = 1; mux = 0;
    repeat (7) @(posedge clk);
    #1 expect_pc(6'd39, "seven sequential steps from 32");
    mux = 1; offset = 6'b111011;
    @(posedge clk); #1;
    expect_pc(6'd35, "JUMP -5 from 39");
    mux = 0;
    @(posedge clk); #1;
    expect_pc(6'd36, "sequential step from 35");
    mux = 1; offset = 6'b000011;
    @(posedge clk); #1;
    expect_pc(6'd40, "BRG +3 from 36");
    model = pc;
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); mux = 1'($urandom); offset = 6'($urandom);
      #1;
      checks++;
      if (pc_plus1 !== model + 6'd1) begin
        failures++;
        $display("FAIL pc_plus1=%0d expected %0d", pc_plus1, model + 6'd1);
      end
      @(posedge clk); #1;
      if (we) model = mux ? model + 6'd1 + offset : model + 6'd1;
      expect_pc(model, "random step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
