// tb_dec1to2: exhaustive check of the 1-to-2 decoder against its truth
// table (y[k] = 1 only when en = 1 and w = k).
module tb_dec1to2;
  logic en, w;
  logic [1:0] y;
  int checks = 0, failures = 0;

  dec1to2 dut (.en, .w, .y);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 2; v++) begin
        logic [1:0] exp;
        en = e[0]; w = v[0];
        #1;
        exp = (e == 1) ? ((v == 1) ? 2'b10 : 2'b01) : 2'b00;
        checks++;
        if (y !== exp) begin
          failures++;
          $display("FAIL en=%0d w=%0d y=%b expected %b", e, v, y, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
