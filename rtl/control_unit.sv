// control_unit: the i281 control table.
//
// Inputs are the one-hot opcode lines and the X/Y register fields from the
// opcode decoder and the flags register. The output is the 18-signal
// control word (ctrl_t). Each control signal is an OR over the opcode
// lines that set it; the register select signals copy X or Y as the table
// says; the PC mux of a conditional branch is its branch condition:
//   BRE/BRZ   B1 = ZF
//   BRNE/BRNZ B2 = ~ZF
//   BRG       B3 = ~ZF & (NF XNOR OF)
//   BRGE      B4 = NF XNOR OF
// PROGRAM_COUNTER_WRITE_ENABLE is 1 for every instruction. Purely
// combinational. Every table entry and the branch equations follow the
// i281 control table; a register select the table leaves blank is driven
// to 00 (register A) here, which the datapath then ignores. Two inputs are
// read by nothing, as in the table: the NOOP line (NOOP sets no control
// signal but the PC write enable) and the carry flag (no branch tests it).
module control_unit
  import i281_pkg::*;
(
  input  logic [NUM_OPS-1:0] op,
  input  logic [1:0]         x,
  input  logic [1:0]         y,
  input  flags_t             flags,
  output ctrl_t              ctrl
);
  logic b1, b2, b3, b4;
  logic [1:0] alu_sel;

  always_comb begin
    b1 = flags.zf;
    b2 = ~flags.zf;
    b3 = ~flags.zf & ~(flags.nf ^ flags.of);
    b4 = ~(flags.nf ^ flags.of);

    ctrl = '0;
    ctrl.imem_write_enable = op[OP_INPUTC] | op[OP_INPUTCF];
    ctrl.pc_mux            = op[OP_JUMP] | (op[OP_BRE] & b1) | (op[OP_BRNE] & b2)
                           | (op[OP_BRG] & b3) | (op[OP_BRGE] & b4);
    ctrl.pc_write_enable   = 1'b1;

    // Register port 0: X for most ALU users, Y where Y holds an offset or
    // the MOVE source.
    if (op[OP_MOVE] | op[OP_LOADF] | op[OP_STOREF])
      ctrl.reg_port0_select = y;
    else if (op[OP_INPUTCF] | op[OP_INPUTDF] | op[OP_ADD] | op[OP_ADDI] | op[OP_SUB]
             | op[OP_SUBI] | op[OP_SHIFTL] | op[OP_SHIFTR] | op[OP_CMP])
      ctrl.reg_port0_select = x;

    // Register port 1: Y for two-register ALU ops, X as store data.
    if (op[OP_ADD] | op[OP_SUB] | op[OP_CMP])
      ctrl.reg_port1_select = y;
    else if (op[OP_STORE] | op[OP_STOREF])
      ctrl.reg_port1_select = x;

    ctrl.reg_write_enable  = op[OP_MOVE] | op[OP_LOADI] | op[OP_ADD] | op[OP_ADDI]
                           | op[OP_SUB] | op[OP_SUBI] | op[OP_LOAD] | op[OP_LOADF]
                           | op[OP_SHIFTL] | op[OP_SHIFTR];
    if (ctrl.reg_write_enable)
      ctrl.reg_write_select = x;

    ctrl.alu_source_mux    = op[OP_INPUTCF] | op[OP_INPUTDF] | op[OP_MOVE] | op[OP_ADDI]
                           | op[OP_SUBI] | op[OP_LOADF] | op[OP_STOREF];
    // ALU_SELECT1 and ALU_SELECT0 columns.
    alu_sel[1]             = op[OP_INPUTCF] | op[OP_INPUTDF] | op[OP_MOVE] | op[OP_ADD]
                           | op[OP_ADDI] | op[OP_SUB] | op[OP_SUBI] | op[OP_LOADF]
                           | op[OP_STOREF] | op[OP_CMP];
    alu_sel[0]             = op[OP_SUB] | op[OP_SUBI] | op[OP_SHIFTR] | op[OP_CMP];
    ctrl.alu_select        = alu_op_e'(alu_sel);
    ctrl.flags_write_enable = op[OP_ADD] | op[OP_ADDI] | op[OP_SUB] | op[OP_SUBI]
                            | op[OP_SHIFTL] | op[OP_SHIFTR] | op[OP_CMP];
    ctrl.alu_result_mux    = op[OP_INPUTC] | op[OP_INPUTD] | op[OP_LOADI] | op[OP_LOAD]
                           | op[OP_STORE];
    ctrl.dmem_input_mux    = op[OP_INPUTD] | op[OP_INPUTDF];
    ctrl.dmem_write_enable = op[OP_INPUTD] | op[OP_INPUTDF] | op[OP_STORE] | op[OP_STOREF];
    ctrl.reg_writeback_mux = op[OP_LOAD] | op[OP_LOADF];
  end
endmodule
