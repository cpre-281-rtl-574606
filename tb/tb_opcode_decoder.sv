// tb_opcode_decoder: drives all 256 values of instruction bits I15..I8 and
// compares the one-hot opcode lines and the X/Y fields with a reference
// built from the i281 machine-code layouts (opcode in I15..I12, sub-opcode
// in I9..I8 for the INPUT and branch groups, I8 for the shifts).
module tb_opcode_decoder;
  import i281_pkg::*;
  logic [7:0] instr_hi;
  logic [NUM_OPS-1:0] op;
  logic [1:0] x, y;
  int checks = 0, failures = 0;

  opcode_decoder dut (.instr_hi, .op, .x, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_index(logic [7:0] h);
    case (h[7:4])
      4'h0: return 0;
      4'h1: return 1 + int'(h[1:0]);   // INPUTC, INPUTCF, INPUTD, INPUTDF
      4'h2: return 5;
      4'h3: return 6;
      4'h4: return 7;
      4'h5: return 8;
      4'h6: return 9;
      4'h7: return 10;
      4'h8: return 11;
      4'h9: return 12;
      4'hA: return 13;
      4'hB: return 14;
      4'hC: return h[0] ? 16 : 15;     // SHIFTR : SHIFTL
      4'hD: return 17;
      4'hE: return 18;
      default: return 19 + int'(h[1:0]); // BRE, BRNE, BRG, BRGE
    endcase
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [NUM_OPS-1:0] exp;
      instr_hi = v[7:0];
      #1;
      exp = '0;
      exp[ref_index(v[7:0])] = 1'b1;
      checks++;
      if (op !== exp) begin
        failures++;
        $display("FAIL I15..I8=%b op=%b expected %b", v[7:0], op, exp);
      end
      checks++;
      if (x !== v[3:2] || y !== v[1:0]) begin
        failures++;
        $display("FAIL I15..I8=%b x=%b y=%b", v[7:0], x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
