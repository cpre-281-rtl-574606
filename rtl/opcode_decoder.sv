// opcode_decoder: turns the upper byte of an i281 instruction into one-hot
// opcode lines.
//
// Bits I15..I12 drive an always-enabled 4-to-16 decoder tree. Three of its
// outputs stand for groups of opcodes that are told apart by I9..I8:
//   y1  (0001, INPUT group) enables a 2-to-4 decoder on I9..I8
//       -> INPUTC, INPUTCF, INPUTD, INPUTDF
//   y12 (1100, SHIFT group) enables a 1-to-2 decoder on I8
//       -> SHIFTL, SHIFTR
//   y15 (1111, branch group) enables a 2-to-4 decoder on I9..I8
//       -> BRE/BRZ, BRNE/BRNZ, BRG, BRGE
// The result is 23 one-hot lines, op[OP_*] (exactly one is 1 for every
// instruction), plus the register fields X = I11..I10 and Y = I9..I8,
// which pass straight through and are not one-hot. Purely combinational.
//
// The decoder tree, the grouping and the bits each sub-decoder uses follow
// the i281 opcode decoder drawings. The branch sub-decoder is not drawn;
// it is built here like the INPUT one, from the branch encodings
// (BRE 00, BRNE 01, BRG 10, BRGE 11 in I9..I8).
module opcode_decoder
  import i281_pkg::*;
(
  input  logic [7:0]           instr_hi, // I15..I8
  output logic [NUM_OPS-1:0]   op,       // one-hot, indexed by op_idx_e
  output logic [1:0]           x,        // I11..I10
  output logic [1:0]           y         // I9..I8
);
  logic [15:0] pri;
  logic [3:0]  input_grp;
  logic [1:0]  shift_grp;
  logic [3:0]  br_grp;

  dec4to16 u_primary (.en(1'b1),     .w(instr_hi[7:4]), .y(pri));
  dec2to4  u_input   (.en(pri[1]),   .w(instr_hi[1:0]), .y(input_grp));
  dec1to2  u_shift   (.en(pri[12]),  .w(instr_hi[0]),   .y(shift_grp));
  dec2to4  u_branch  (.en(pri[15]),  .w(instr_hi[1:0]), .y(br_grp));

  always_comb begin
    op              = '0;
    op[OP_NOOP]     = pri[0];
    op[OP_INPUTC]   = input_grp[0];
    op[OP_INPUTCF]  = input_grp[1];
    op[OP_INPUTD]   = input_grp[2];
    op[OP_INPUTDF]  = input_grp[3];
    op[OP_MOVE]     = pri[2];
    op[OP_LOADI]    = pri[3];
    op[OP_ADD]      = pri[4];
    op[OP_ADDI]     = pri[5];
    op[OP_SUB]      = pri[6];
    op[OP_SUBI]     = pri[7];
    op[OP_LOAD]     = pri[8];
    op[OP_LOADF]    = pri[9];
    op[OP_STORE]    = pri[10];
    op[OP_STOREF]   = pri[11];
    op[OP_SHIFTL]   = shift_grp[0];
    op[OP_SHIFTR]   = shift_grp[1];
    op[OP_CMP]      = pri[13];
    op[OP_JUMP]     = pri[14];
    op[OP_BRE]      = br_grp[0];
    op[OP_BRNE]     = br_grp[1];
    op[OP_BRG]      = br_grp[2];
    op[OP_BRGE]     = br_grp[3];
    x               = instr_hi[3:2];
    y               = instr_hi[1:0];
  end
endmodule
