// i281_cpu: single-cycle 8-bit i281 CPU.
//
// Every clock cycle one 16-bit instruction is read from the code memory at
// the PC, decoded and executed; registers, flags, data memory, code memory
// and the PC are all written on the same rising edge. The datapath:
//   * opcode_decoder turns C15..C8 into one-hot opcode lines and the X/Y
//     register fields; control_unit turns those and the flags into the 18
//     control signals of the control table.
//   * register_file reads port 0 and port 1; the ALU source mux feeds the
//     ALU either port 1 or the immediate C7..C0.
//   * The ALU result mux passes either the ALU result or C7..C0. Its
//     output is the data address (LOAD, STORE, their F forms, INPUTD*),
//     the code address (INPUTC*) and the value written back to a register
//     (LOADI/LOADP, MOVE and arithmetic).
//   * The data memory input mux stores either register port 1 or switches
//     SW7..SW0; INPUTC* writes switches SW15..SW0 into the code memory.
//   * The register write-back mux picks the ALU result mux or the data
//     memory read data (LOAD, LOADF).
//   * pc_logic computes PC+1 and PC+1+offset (C5..C0) with 6-bit adders.
//
// Interface: clk, synchronous active-high rst (PC <- START_PC, registers
// and flags <- 0; memories are not cleared). sw[15:0] are the board
// switches. The loader port (load_en, load_cmem, load_addr, load_data)
// fills the memories while the CPU is held: with load_en = 1 nothing but
// the addressed memory word changes, so a program can be put in place
// before or between runs. pc, instr, regs, flags and the data-memory
// debug read port (dbg_addr/dbg_data) are brought out for display.
//
// The datapath, the control table, the decoder and the PC logic follow
// the i281 description. The loader port, the debug read port, the reset
// behaviour and the 16-byte data memory are this implementation's choices.
// Only the low 4 bits of an 8-bit data address reach the 16-byte data
// memory (higher addresses wrap), and only the low 6 bits of load_addr
// and of an INPUTC* address reach the 64-word code memory, so load_addr[7:6]
// is read by nothing. The PC+1 and next-PC outputs of pc_logic are left
// open: the PC register inside pc_logic is their only user.
module i281_cpu
  import i281_pkg::*;
#(
  parameter logic [5:0]  START_PC   = 6'd0,
  parameter int unsigned DMEM_DEPTH = 16,
  localparam int unsigned PC_W      = 6,
  localparam int unsigned DA_W      = $clog2(DMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [15:0]       sw,
  // program / data loader
  input  logic              load_en,
  input  logic              load_cmem,   // 1: code memory, 0: data memory
  input  logic [7:0]        load_addr,
  input  logic [15:0]       load_data,   // data memory takes [7:0]
  // observation
  output logic [PC_W-1:0]   pc,
  output logic [15:0]       instr,
  output logic [DATA_W-1:0] regs [4],
  output flags_t            flags,
  input  logic [DA_W-1:0]   dbg_addr,
  output logic [7:0]        dbg_data
);
  logic [NUM_OPS-1:0] op;
  logic [1:0]         fx, fy;
  ctrl_t              ctrl;
  logic [DATA_W-1:0]  port0, port1, imm, alu_b, alu_res, res_mux, dmem_rd, dmem_wd, reg_wd;
  flags_t             alu_flags;
  logic               run;

  // Code memory write port signals
  logic               cm_we;
  logic [PC_W-1:0]    cm_waddr;
  logic [15:0]        cm_wdata;
  // Data memory port signals
  logic               dm_we;
  logic [DA_W-1:0]    dm_addr;
  logic [7:0]         dm_wdata;

  // The CPU changes no state while it is held in reset or being loaded.
  assign run = ~load_en & ~rst;
  assign imm = instr[7:0];

  code_memory #(.DEPTH(1 << PC_W)) u_cmem (
    .clk, .rd_addr(pc), .instr,
    .wr_en(cm_we), .wr_addr(cm_waddr), .wr_data(cm_wdata)
  );

  opcode_decoder u_dec (.instr_hi(instr[15:8]), .op, .x(fx), .y(fy));

  control_unit u_ctrl (.op, .x(fx), .y(fy), .flags, .ctrl);

  pc_logic #(.PC_W(PC_W), .START_PC(START_PC)) u_pc (
    .clk, .rst,
    .pc_write_enable(ctrl.pc_write_enable & run),
    .pc_mux(ctrl.pc_mux),
    .offset(instr[PC_W-1:0]),
    .pc, .pc_plus1(), .pc_next()
  );

  register_file u_rf (
    .clk, .rst,
    .port0_select(ctrl.reg_port0_select), .port1_select(ctrl.reg_port1_select),
    .port0, .port1,
    .write_enable(ctrl.reg_write_enable & run),
    .write_select(ctrl.reg_write_select),
    .write_data(reg_wd),
    .regs
  );

  alu u_alu (.a(port0), .b(alu_b), .alu_select(ctrl.alu_select), .result(alu_res), .flags(alu_flags));

  flags_register u_flags (
    .clk, .rst,
    .write_enable(ctrl.flags_write_enable & run),
    .flags_in(alu_flags), .flags
  );

  data_memory #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(dm_addr), .rd_data(dmem_rd),
    .wr_en(dm_we), .wr_data(dm_wdata),
    .dbg_addr, .dbg_data
  );

  always_comb begin
    alu_b   = ctrl.alu_source_mux    ? imm     : port1;
    res_mux = ctrl.alu_result_mux    ? imm     : alu_res;
    dmem_wd = ctrl.dmem_input_mux    ? sw[7:0] : port1;
    reg_wd  = ctrl.reg_writeback_mux ? dmem_rd : res_mux;

    if (load_en) begin
      cm_we    = load_cmem;
      cm_waddr = load_addr[PC_W-1:0];
      cm_wdata = load_data;
      dm_we    = ~load_cmem;
      dm_addr  = load_addr[DA_W-1:0];
      dm_wdata = load_data[7:0];
    end else begin
      cm_we    = ctrl.imem_write_enable & run;
      cm_waddr = res_mux[PC_W-1:0];
      cm_wdata = sw;
      dm_we    = ctrl.dmem_write_enable & run;
      dm_addr  = res_mux[DA_W-1:0];
      dm_wdata = dmem_wd;
    end
  end

  // Exactly one opcode line is active for every instruction word.
  a_onehot_op: assert property (@(posedge clk) disable iff (rst) $onehot(op));
endmodule
