// pc_logic: the i281 program counter and its next-address logic.
//
// A 6-bit adder forms PC+1 (the implicit +1). A second 6-bit adder adds
// the low 6 bits of the instruction's PC offset field (C5..C0, two's
// complement) to PC+1. A 2-to-1 mux, steered by PROGRAM_COUNTER_MUX,
// picks PC+1 (0) or PC+1+offset (1), and the PC register loads it on the
// rising clock edge while PROGRAM_COUNTER_WRITE_ENABLE is 1. Both adders
// drop their carry, so addresses wrap modulo 64 and the usable offset
// range is -31..+32 instructions from the branch itself.
//
// The adders, the mux, the 6-bit width and the offset taken from the last
// six bits follow the i281 PC drawing. The synchronous, active-high reset
// and its START_PC value are this implementation's choice (the i281
// simulator offers starting at either 0 or 32).
module pc_logic #(
  parameter int unsigned  PC_W     = 6,
  parameter logic [5:0]   START_PC = 6'd0
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            pc_write_enable,
  input  logic            pc_mux,
  input  logic [PC_W-1:0] offset,   // C5..C0
  output logic [PC_W-1:0] pc,
  output logic [PC_W-1:0] pc_plus1,
  output logic [PC_W-1:0] pc_next
);
  logic [PC_W-1:0] pc_target;

  always_comb begin
    pc_plus1  = pc + PC_W'(1);
    pc_target = pc_plus1 + offset;
    pc_next   = pc_mux ? pc_target : pc_plus1;
  end

  always_ff @(posedge clk) begin
    if (rst)
      pc <= PC_W'(START_PC);
    else if (pc_write_enable)
      pc <= pc_next;
  end
endmodule
