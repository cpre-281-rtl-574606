// i281_pkg: types and constants shared by the i281 CPU modules.
//
// The i281 is an 8-bit, single-cycle teaching CPU with four registers
// (A-D), a 64-word x 16-bit code memory and a byte-wide data memory.
// Every instruction is 16 bits: C15..C12 is the primary opcode, C11..C10
// the first register field (X), C9..C8 the second register field (Y) or
// an opcode extension, and C7..C0 an immediate value, a data or code
// address, or a PC offset.
//
// The opcode list, the bit layouts, the register numbering and the names
// of the control signals follow the i281 instruction-set description.
// The struct packing of the control word and the flag struct are this
// implementation's own choice.
package i281_pkg;

  localparam int unsigned DATA_W = 8;   // register and data-memory width
  localparam int unsigned NUM_OPS = 23; // one-hot opcode lines of the decoder

  // Register numbering used in the X and Y fields.
  typedef enum logic [1:0] {
    REG_A = 2'b00,
    REG_B = 2'b01,
    REG_C = 2'b10,
    REG_D = 2'b11
  } reg_e;

  // Index of each one-hot line of the opcode decoder (outputs y0..y22).
  typedef enum int unsigned {
    OP_NOOP    = 0,
    OP_INPUTC  = 1,
    OP_INPUTCF = 2,
    OP_INPUTD  = 3,
    OP_INPUTDF = 4,
    OP_MOVE    = 5,
    OP_LOADI   = 6,  // LOADI and LOADP share this machine opcode
    OP_ADD     = 7,
    OP_ADDI    = 8,
    OP_SUB     = 9,
    OP_SUBI    = 10,
    OP_LOAD    = 11,
    OP_LOADF   = 12,
    OP_STORE   = 13,
    OP_STOREF  = 14,
    OP_SHIFTL  = 15,
    OP_SHIFTR  = 16,
    OP_CMP     = 17,
    OP_JUMP    = 18,
    OP_BRE     = 19, // BRE and BRZ
    OP_BRNE    = 20, // BRNE and BRNZ
    OP_BRG     = 21,
    OP_BRGE    = 22
  } op_idx_e;

  // Primary opcodes (instruction bits C15..C12), decoded by the 4-to-16
  // decoder of opcode_decoder: 0000 NOOP, 0001 INPUTC/CF/D/DF, 0010 MOVE,
  // 0011 LOADI/LOADP, 0100 ADD, 0101 ADDI, 0110 SUB, 0111 SUBI, 1000 LOAD,
  // 1001 LOADF, 1010 STORE, 1011 STOREF, 1100 SHIFTL/SHIFTR, 1101 CMP,
  // 1110 JUMP, 1111 BRE/BRNE/BRG/BRGE.

  // ALU_SELECT1..0 encoding, read from the control table:
  // SHIFTL 00, SHIFTR 01, ADD (and every address computation) 10, SUB/CMP 11.
  typedef enum logic [1:0] {
    ALU_SHL = 2'b00,
    ALU_SHR = 2'b01,
    ALU_ADD = 2'b10,
    ALU_SUB = 2'b11
  } alu_op_e;

  // Flags register contents.
  typedef struct packed {
    logic zf; // zero
    logic nf; // negative (bit 7 of the result)
    logic of; // two's-complement overflow
    logic cf; // carry / bit shifted out
  } flags_t;

  // The 18 control signals of the control table, in its column order.
  typedef struct packed {
    logic       imem_write_enable;
    logic       pc_mux;            // 1: PC+1+offset, 0: PC+1
    logic       pc_write_enable;
    logic [1:0] reg_port0_select;
    logic [1:0] reg_port1_select;
    logic [1:0] reg_write_select;
    logic       reg_write_enable;
    logic       alu_source_mux;    // 1: immediate C7..C0, 0: register port 1
    alu_op_e    alu_select;
    logic       flags_write_enable;
    logic       alu_result_mux;    // 1: immediate C7..C0, 0: ALU result
    logic       dmem_input_mux;    // 1: switches SW7..SW0, 0: register port 1
    logic       dmem_write_enable;
    logic       reg_writeback_mux; // 1: data memory, 0: ALU result mux
  } ctrl_t;

endpackage
