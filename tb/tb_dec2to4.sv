// tb_dec2to4: exhaustive check of the 2-to-4 decoder against its truth
// table (y[k] = 1 only when en = 1 and w = k).
module tb_dec2to4;
  logic en;
  logic [1:0] w;
  logic [3:0] y;
  int checks = 0, failures = 0;

  dec2to4 dut (.en, .w, .y);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int v = 0; v < 4; v++) begin
        logic [3:0] exp;
        en = e[0]; w = v[1:0];
        #1;
        exp = '0;
        if (e == 1) exp[v] = 1'b1;
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
