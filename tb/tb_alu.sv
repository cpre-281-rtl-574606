// tb_alu: exhaustive check of all four ALU operations over every 8-bit
// operand pair, against integer arithmetic: result, ZF, NF, CF and signed
// overflow (computed from the signed integer result leaving -128..127).
module tb_alu;
  import i281_pkg::*;
  logic [7:0] a, b, result;
  alu_op_e sel;
  flags_t flags;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_select(sel), .result, .flags);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++)
      for (int ia = 0; ia < 256; ia++)
        for (int ib = 0; ib < 256; ib++) begin
          int sa, sb, sres, ures;
          logic [7:0] er;
          logic ecf, eof;
          a = ia[7:0]; b = ib[7:0]; sel = alu_op_e'(s[1:0]);
          #1;
          sa = (ia > 127) ? ia - 256 : ia;
          sb = (ib > 127) ? ib - 256 : ib;
          eof = 0;
          case (s)
            0: begin er = 8'((ia * 2) % 256); ecf = ia >= 128; end
            1: begin er = 8'(ia / 2);         ecf = ia[0];     end
            2: begin
              ures = ia + ib; er = 8'(ures % 256); ecf = ures > 255;
              sres = sa + sb; eof = (sres > 127) || (sres < -128);
            end
            default: begin
              ures = ia + (255 - ib) + 1; er = 8'(ures % 256); ecf = ures > 255;
              sres = sa - sb; eof = (sres > 127) || (sres < -128);
            end
          endcase
          checks++;
          if (result !== er || flags.zf !== (er == 0) || flags.nf !== er[7] ||
              flags.cf !== ecf || flags.of !== eof) begin
            failures++;
            if (failures < 10)
              $display("FAIL sel=%0d a=%0d b=%0d: %0d zf%b nf%b cf%b of%b, expected %0d cf%b of%b",
                       s, ia, ib, result, flags.zf, flags.nf, flags.cf, flags.of, er, ecf, eof);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
