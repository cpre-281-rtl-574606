// alu: the i281 arithmetic-logic unit.
//
// Operand a comes from register port 0, operand b from the ALU source mux
// (register port 1 or the immediate C7..C0). alu_select picks:
//   ALU_SHL (00)  result = a << 1, LSB 0, CF = a[7]
//   ALU_SHR (01)  result = a >> 1, MSB 0, CF = a[0]
//   ALU_ADD (10)  result = a + b, CF = carry out, OF = signed overflow
//   ALU_SUB (11)  result = a - b (as a + ~b + 1), CF = carry out of that
//                 sum, OF = signed overflow
// ZF is 1 when the 8-bit result is 0 and NF is its bit 7. Purely
// combinational; the flags register decides whether the flags are kept.
//
// The operation encoding and the shift behaviour (shifted-out bit into the
// carry flag, zero shifted in) follow the i281 description. The carry
// convention for subtraction and OF = 0 for shifts are this
// implementation's choice: the description does not define them.
module alu
  import i281_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  alu_op_e           alu_select,
  output logic [DATA_W-1:0] result,
  output flags_t            flags
);
  logic [DATA_W:0]   sum;
  logic [DATA_W-1:0] b_eff;

  always_comb begin
    b_eff    = (alu_select == ALU_SUB) ? ~b : b;
    sum      = {1'b0, a} + {1'b0, b_eff} + (DATA_W+1)'(alu_select == ALU_SUB);
    flags.of = 1'b0;
    unique case (alu_select)
      ALU_SHL: begin
        result   = {a[DATA_W-2:0], 1'b0};
        flags.cf = a[DATA_W-1];
      end
      ALU_SHR: begin
        result   = {1'b0, a[DATA_W-1:1]};
        flags.cf = a[0];
      end
      default: begin // ALU_ADD, ALU_SUB
        result   = sum[DATA_W-1:0];
        flags.cf = sum[DATA_W];
        flags.of = (a[DATA_W-1] == b_eff[DATA_W-1]) && (result[DATA_W-1] != a[DATA_W-1]);
      end
    endcase
    flags.zf = (result == '0);
    flags.nf = result[DATA_W-1];
  end
endmodule
