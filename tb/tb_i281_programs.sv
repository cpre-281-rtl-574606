// tb_i281_programs: runs the three example programs of the i281 material
// placed in code memory from address 32 (100000b), with the CPU built to
// start at PC 32 as in the code-memory drawing, and checks both the
// results and the exact number of clock cycles:
//   sum 1..5, for loop : sum = 15, PC leaves the last instruction after
//                        31 cycles (3 + 5 x 5 loop + CMP, BRG, STORE)
//   sum 1..5, do loop  : sum = 15 after 24 cycles (3 + 5 x 4 + STORE)
//   bubble sort        : array sorted, End reached after 377 cycles
//                        (1 + 7 x 10 outer + 4 exit + 28 x 10 inner
//                        + 2 x 11 swaps for the 11 inversions of the input)
module tb_i281_programs;
  import i281_pkg::*;

  logic        clk = 0, rst;
  logic [15:0] sw = 16'h0000;
  logic        load_en, load_cmem;
  logic [7:0]  load_addr;
  logic [15:0] load_data;
  logic [5:0]  pc;
  logic [15:0] instr;
  logic [7:0]  regs [4];
  flags_t      flags;
  logic [3:0]  dbg_addr;
  logic [7:0]  dbg_data;
  int checks = 0, failures = 0;

  i281_cpu #(.START_PC(6'd32)) dut (.clk, .rst, .sw, .load_en, .load_cmem, .load_addr, .load_data,
                                    .pc, .instr, .regs, .flags, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_word(bit to_cmem, int addr, logic [15:0] data);
    @(negedge clk);
    load_en = 1; load_cmem = to_cmem; load_addr = 8'(addr); load_data = data;
    @(posedge clk);
    #1 load_en = 0;
  endtask

  task automatic load_program(logic [15:0] code [], logic [7:0] data []);
    for (int a = 0; a < 64; a++)
      load_word(1, a, (a >= 32 && a - 32 < code.size()) ? code[a - 32] : 16'h0000);
    for (int a = 0; a < 16; a++) load_word(0, a, a < data.size() ? 16'(data[a]) : 16'h0000);
    @(negedge clk); rst = 1;
    @(posedge clk); #1 rst = 0;
  endtask

  // Run until the PC reaches stop_pc; check the cycle count.
  task automatic run_to(logic [5:0] stop_pc, int exp_cycles, string what);
    int n = 0;
    while (pc != stop_pc && n < 5000) begin
      @(posedge clk); #1;
      n++;
    end
    checks++;
    if (n != exp_cycles) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", what, n, exp_cycles);
    end else
      $display("%s: %0d cycles", what, n);
  endtask

  task automatic expect_byte(int addr, logic [7:0] exp, string what);
    dbg_addr = 4'(addr); #1;
    checks++;
    if (dbg_data !== exp) begin
      failures++;
      $display("FAIL %s: dmem[%0d]=%0d expected %0d", what, addr, dbg_data, exp);
    end
  endtask

  logic [15:0] p_sum [] = '{16'h3400, 16'h3001, 16'h8C00, 16'hD300, 16'hF203,
                            16'h4400, 16'h5001, 16'hE0FB, 16'hA402};
  logic [15:0] p_do [] = '{16'h3000, 16'h3400, 16'h8C00, 16'h5001, 16'h4400,
                           16'hDC00, 16'hF2FC, 16'hA401};
  logic [15:0] p_bubble [] = '{
    16'h3000, 16'h8C08, 16'h3400, 16'hD300, 16'hF30E, 16'h8C08, 16'h6C00, 16'hD700,
    16'hF308, 16'h9900, 16'h9D01, 16'hDE00, 16'hF302, 16'hBD00, 16'hB901, 16'h5401,
    16'hE0F4, 16'h5001, 16'hE0EE, 16'h0000};

  initial begin
    rst = 1; load_en = 0; load_cmem = 0; load_addr = 0; load_data = 0; dbg_addr = 0;
    @(posedge clk); #1 rst = 0;

    load_program(p_sum, '{8'd5, 8'd0, 8'd0});
    checks++;
    if (pc !== 6'd32 || instr !== 16'h3400) begin
      failures++;
      $display("FAIL reset: pc=%0d instr=%h", pc, instr);
    end
    run_to(6'd41, 31, "sum for-loop");
    expect_byte(2, 8'd15, "sum for-loop");
    expect_byte(0, 8'd5, "N unchanged");

    load_program(p_do, '{8'd5, 8'd0});
    run_to(6'd40, 24, "sum do-loop");
    expect_byte(1, 8'd15, "sum do-loop");

    load_program(p_bubble, '{8'd7, 8'd3, 8'd2, 8'd1, 8'd6, 8'd4, 8'd5, 8'd8, 8'd7, 8'd0});
    run_to(6'd51, 377, "bubble sort");
    for (int k = 0; k < 8; k++) expect_byte(k, 8'(k + 1), "bubble sort");
    expect_byte(8, 8'd7, "last unchanged");
    checks++;
    if (regs[0] !== 8'd7) begin
      failures++;
      $display("FAIL bubble sort: register A (i) = %0d, expected 7", regs[0]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
