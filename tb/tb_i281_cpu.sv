// tb_i281_cpu: end-to-end test of the i281 CPU at its default parameters.
//
// An instruction-level reference model of the i281 (written here from the
// instruction descriptions, independently of the RTL) runs in lock step
// with the CPU. After every clock edge the testbench compares the PC, the
// fetched instruction, all four registers, the flags and one data-memory
// byte (all 16 at the end of each program) with the model.
//
// Programs, all loaded through the loader port:
//   1. "add the numbers from 1 to 5" (for-loop form): stores 15, and must
//      finish its 31 instructions in exactly 31 clock cycles (one
//      instruction per clock).
//   2. the same sum written as a do-loop: stores 15.
//   3. bubble sort of 7,3,2,1,6,4,5,8: the array must end up sorted.
//   4. a self-modifying program: INPUTC/INPUTCF write switch values into
//      the code memory, INPUTD/INPUTDF into the data memory, and the newly
//      written instructions are then executed.
//   5. random programs: random code words, random data and random switch
//      values every cycle.
// Each mechanism of the design is counted (every one of the 23 decoded
// opcodes, each conditional branch both taken and not taken, a signed
// overflow, a carry out of a shift, execution of a word written by INPUTC,
// PC wrap-around from 63 to 0); one that never happens is a failure.
module tb_i281_cpu;
  import i281_pkg::*;

  logic        clk = 0, rst;
  logic [15:0] sw;
  logic        load_en, load_cmem;
  logic [7:0]  load_addr;
  logic [15:0] load_data;
  logic [5:0]  pc;
  logic [15:0] instr;
  logic [7:0]  regs [4];
  flags_t      flags;
  logic [3:0]  dbg_addr;
  logic [7:0]  dbg_data;

  i281_cpu dut (.clk, .rst, .sw, .load_en, .load_cmem, .load_addr, .load_data,
                .pc, .instr, .regs, .flags, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- reference model ----------------
  logic [15:0] m_cmem [64];
  logic [7:0]  m_dmem [16];
  logic [7:0]  m_r [4];
  logic        m_zf, m_nf, m_of, m_cf;
  logic [5:0]  m_pc;
  bit          m_written [64];   // word written by INPUTC since loading
  logic [15:0] m_last;           // last instruction the model executed

  // mechanism counters
  int op_count [NUM_OPS];
  int br_taken [4], br_not [4];
  int n_overflow, n_shift_carry, n_selfmod_exec, n_wrap;

  task automatic m_reset();
    m_r = '{default: 8'h00};
    {m_zf, m_nf, m_of, m_cf} = 4'b0000;
    m_pc = 6'd0;
  endtask

  task automatic m_addsub(input logic [7:0] a, input logic [7:0] b, input bit sub,
                          output logic [7:0] res);
    int ua, ub, sa, sb, s;
    ua = int'(a); ub = int'(b);
    sa = a[7] ? ua - 256 : ua;
    sb = b[7] ? ub - 256 : ub;
    if (sub) begin
      s    = ua + (255 - ub) + 1;
      m_of = (sa - sb > 127) || (sa - sb < -128);
    end else begin
      s    = ua + ub;
      m_of = (sa + sb > 127) || (sa + sb < -128);
    end
    res  = 8'(s % 256);
    m_cf = s > 255;
    m_zf = res == 0;
    m_nf = res[7];
    if (m_of) n_overflow++;
  endtask

  // Execute one instruction of the model with switch value s.
  task automatic m_step(input logic [15:0] s);
    logic [15:0] i;
    logic [3:0]  opc;
    logic [1:0]  x, y;
    logic [7:0]  imm, res, addr;
    logic [5:0]  next;
    bit          take;
    int          idx;
    i = m_cmem[m_pc];
    m_last = i;
    opc = i[15:12]; x = i[11:10]; y = i[9:8]; imm = i[7:0];
    next = m_pc + 6'd1;
    if (m_written[m_pc]) n_selfmod_exec++;
    case (opc)
      4'h0: idx = 0;
      4'h1: begin
        idx  = 1 + int'(y);
        addr = y[0] ? 8'(m_r[x] + imm) : imm;
        if (!y[1]) begin
          m_cmem[addr[5:0]] = s;
          m_written[addr[5:0]] = 1;
        end else
          m_dmem[addr[3:0]] = s[7:0];
      end
      // MOVE goes through the ALU as Y + C7..C0 (the assembler emits zeros).
      4'h2: begin idx = 5; m_r[x] = 8'(m_r[y] + imm); end
      4'h3: begin idx = 6; m_r[x] = imm; end
      4'h4: begin idx = 7;  m_addsub(m_r[x], m_r[y], 0, res); m_r[x] = res; end
      4'h5: begin idx = 8;  m_addsub(m_r[x], imm,    0, res); m_r[x] = res; end
      4'h6: begin idx = 9;  m_addsub(m_r[x], m_r[y], 1, res); m_r[x] = res; end
      4'h7: begin idx = 10; m_addsub(m_r[x], imm,    1, res); m_r[x] = res; end
      4'h8: begin idx = 11; m_r[x] = m_dmem[imm[3:0]]; end
      4'h9: begin idx = 12; addr = 8'(m_r[y] + imm); m_r[x] = m_dmem[addr[3:0]]; end
      4'hA: begin idx = 13; m_dmem[imm[3:0]] = m_r[x]; end
      4'hB: begin idx = 14; addr = 8'(m_r[y] + imm); m_dmem[addr[3:0]] = m_r[x]; end
      4'hC: begin
        if (i[8]) begin idx = 16; m_cf = m_r[x][0]; res = m_r[x] >> 1; end
        else      begin idx = 15; m_cf = m_r[x][7]; res = m_r[x] << 1; end
        m_r[x] = res; m_zf = res == 0; m_nf = res[7]; m_of = 0;
        if (m_cf) n_shift_carry++;
      end
      4'hD: begin idx = 17; m_addsub(m_r[x], m_r[y], 1, res); end
      4'hE: begin idx = 18; next = m_pc + 6'd1 + imm[5:0]; end
      default: begin
        idx = 19 + int'(y);
        case (y)
          2'd0: take = m_zf;
          2'd1: take = !m_zf;
          2'd2: take = !m_zf && (m_nf == m_of);
          default: take = (m_nf == m_of);
        endcase
        if (take) begin next = m_pc + 6'd1 + imm[5:0]; br_taken[y]++; end
        else br_not[y]++;
      end
    endcase
    op_count[idx]++;
    if (m_pc == 6'd63 && next == 6'd0) n_wrap++;
    m_pc = next;
  endtask

  // ---------------- helpers ----------------
  task automatic load_word(bit to_cmem, int addr, logic [15:0] data);
    @(negedge clk);
    load_en = 1; load_cmem = to_cmem; load_addr = 8'(addr); load_data = data;
    @(posedge clk);
    #1 load_en = 0;
    if (to_cmem) begin m_cmem[addr] = data; m_written[addr] = 0; end
    else m_dmem[addr] = data[7:0];
  endtask

  task automatic load_program(logic [15:0] code [], logic [7:0] data []);
    for (int a = 0; a < 64; a++) load_word(1, a, a < code.size() ? code[a] : 16'h0000);
    for (int a = 0; a < 16; a++) load_word(0, a, a < data.size() ? 16'(data[a]) : 16'h0000);
  endtask

  task automatic do_reset();
    @(negedge clk); rst = 1;
    @(posedge clk); #1 rst = 0;
    m_reset();
  endtask

  task automatic compare_state(string what);
    checks++;
    if (pc !== m_pc || regs[0] !== m_r[0] || regs[1] !== m_r[1] || regs[2] !== m_r[2] ||
        regs[3] !== m_r[3] || flags !== {m_zf, m_nf, m_of, m_cf}) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s (after %h): pc=%0d A=%h B=%h C=%h D=%h flags=%b ; model pc=%0d A=%h B=%h C=%h D=%h flags=%b",
                 what, m_last, pc, regs[0], regs[1], regs[2], regs[3], flags,
                 m_pc, m_r[0], m_r[1], m_r[2], m_r[3], {m_zf, m_nf, m_of, m_cf});
    end
    checks++;
    if (instr !== m_cmem[m_pc]) begin
      failures++;
      if (failures < 20) $display("FAIL %s: instr=%h model %h", what, instr, m_cmem[m_pc]);
    end
    #0;
    checks++;
    if (dbg_data !== m_dmem[dbg_addr]) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: dmem[%0d]=%h model %h", what, dbg_addr, dbg_data, m_dmem[dbg_addr]);
    end
  endtask

  task automatic compare_dmem(string what);
    for (int a = 0; a < 16; a++) begin
      dbg_addr = 4'(a); #1;
      checks++;
      if (dbg_data !== m_dmem[a]) begin
        failures++;
        $display("FAIL %s: dmem[%0d]=%h model %h", what, a, dbg_data, m_dmem[a]);
      end
    end
  endtask

  // Run n cycles in lock step; random_sw picks a new switch value each cycle.
  task automatic run(int n, bit random_sw, string what);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      if (random_sw) sw = 16'($urandom);
      dbg_addr = 4'($urandom);
      m_step(sw);
      @(posedge clk); #1;
      compare_state(what);
    end
  endtask

  task automatic expect_byte(int addr, logic [7:0] exp, string what);
    dbg_addr = 4'(addr); #1;
    checks++;
    if (dbg_data !== exp) begin
      failures++;
      $display("FAIL %s: dmem[%0d]=%0d expected %0d", what, addr, dbg_data, exp);
    end
  endtask

  // ---------------- programs (machine code of the i281 examples) ----------------
  // Sum 1..5 with a for loop. Data: N=5 @0, i @1, sum @2.
  logic [15:0] p_sum [] = '{16'h3400, 16'h3001, 16'h8C00, 16'hD300, 16'hF203,
                            16'h4400, 16'h5001, 16'hE0FB, 16'hA402};
  // Sum 1..5 with a do loop. Data: N=5 @0, sum @1.
  logic [15:0] p_do [] = '{16'h3000, 16'h3400, 16'h8C00, 16'h5001, 16'h4400,
                           16'hDC00, 16'hF2FC, 16'hA401};
  // Bubble sort. Data: array @0..7, last=7 @8, temp @9.
  logic [15:0] p_bubble [] = '{
    16'h3000, 16'h8C08, 16'h3400, 16'hD300, 16'hF30E, 16'h8C08, 16'h6C00, 16'hD700,
    16'hF308, 16'h9900, 16'h9D01, 16'hDE00, 16'hF302, 16'hBD00, 16'hB901, 16'h5401,
    16'hE0F4, 16'h5001, 16'hE0EE, 16'h0000};
  // Self-modifying: with SW = 16'h3BA5 ("LOADI C, A5"):
  //  0 LOADI D, 5
  //  1 INPUTC  [32]        code[32] = SW
  //  2 INPUTCF [D + 28]    code[33] = SW
  //  3 INPUTD  [3]         data[3]  = SW[7:0]
  //  4 INPUTDF [D + 1]     data[6]  = SW[7:0]
  //  5 JUMP +26            -> 32
  // 32 (written) LOADI C, A5
  // 33 (written) LOADI C, A5
  // 34 MOVE A, C
  // 35 SHIFTL A            (carry out, A = 4A)
  // 36 SHIFTR C
  // 37 STORE [7], A
  // 38 NOOP ...
  logic [15:0] p_self [] = '{16'h3C05, 16'h1020, 16'h1D1C, 16'h1203, 16'h1F01, 16'hE01A};

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] code [];
    logic [7:0]  data [];
    rst = 1; sw = 0; load_en = 0; load_cmem = 0; load_addr = 0; load_data = 0; dbg_addr = 0;
    m_written = '{default: 0};
    m_reset();
    @(posedge clk); #1 rst = 0;

    // 1. sum 1..5, for loop: 31 instructions in 31 cycles.
    load_program(p_sum, '{8'd5, 8'd0, 8'd0});
    do_reset();
    run(31, 0, "sum-for");
    checks++;
    if (pc !== 6'd9) begin
      failures++;
      $display("FAIL sum-for: after 31 cycles pc=%0d, expected 9 (one instruction per clock)", pc);
    end
    expect_byte(2, 8'd15, "sum-for result");
    run(5, 0, "sum-for tail");

    // 2. sum 1..5, do loop.
    load_program(p_do, '{8'd5, 8'd0});
    do_reset();
    run(40, 0, "sum-do");
    expect_byte(1, 8'd15, "sum-do result");

    // 3. bubble sort.
    load_program(p_bubble, '{8'd7, 8'd3, 8'd2, 8'd1, 8'd6, 8'd4, 8'd5, 8'd8, 8'd7, 8'd0});
    do_reset();
    begin
      int cyc;
      cyc = 0;
      while (m_pc != 6'd19 && cyc < 2000) begin
        run(1, 0, "bubble");
        cyc++;
      end
      $display("bubble sort reached End after %0d cycles", cyc);
    end
    for (int k = 0; k < 8; k++) expect_byte(k, 8'(k + 1), "bubble result");
    compare_dmem("bubble");

    // 4. self-modifying code and the INPUT instructions.
    code = new[64];
    foreach (code[k]) code[k] = 16'h0000;
    foreach (p_self[k]) code[k] = p_self[k];
    code[34] = 16'h2200; code[35] = 16'hC000; code[36] = 16'hC900; code[37] = 16'hA007;
    load_program(code, '{8'h11, 8'h22, 8'h33, 8'h44, 8'h55, 8'h66, 8'h77, 8'h88});
    sw = 16'h3BA5;
    do_reset();
    run(40, 0, "self-modifying");
    expect_byte(3, 8'hA5, "INPUTD");
    expect_byte(6, 8'hA5, "INPUTDF");
    expect_byte(7, 8'h4A, "STORE after SHIFTL");
    compare_dmem("self-modifying");

    // 5. random programs with random switches.
    for (int p = 0; p < 40; p++) begin
      code = new[64];
      data = new[16];
      foreach (code[k]) code[k] = 16'($urandom);
      foreach (data[k]) data[k] = 8'($urandom);
      load_program(code, data);
      do_reset();
      run(300, 1, "random");
      compare_dmem("random");
    end

    // Mechanism coverage.
    for (int k = 0; k < NUM_OPS; k++) begin
      checks++;
      if (op_count[k] == 0) begin failures++; $display("FAIL opcode line %0d never executed", k); end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (br_taken[k] == 0 || br_not[k] == 0) begin
        failures++;
        $display("FAIL branch %0d taken %0d / not taken %0d", k, br_taken[k], br_not[k]);
      end
    end
    checks++; if (n_overflow == 0)     begin failures++; $display("FAIL no signed overflow"); end
    checks++; if (n_shift_carry == 0)  begin failures++; $display("FAIL no shift carry"); end
    checks++; if (n_selfmod_exec == 0) begin failures++; $display("FAIL no self-modified word executed"); end
    checks++; if (n_wrap == 0)         begin failures++; $display("FAIL no PC wrap-around"); end
    $display("COUNT opcodes: %p", op_count);
    $display("COUNT branches taken %p not taken %p", br_taken, br_not);
    $display("COUNT overflow=%0d shift_carry=%0d selfmod_exec=%0d pc_wrap=%0d",
             n_overflow, n_shift_carry, n_selfmod_exec, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
