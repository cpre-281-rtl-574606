// tb_flags_register: checks reset to zero, then that random flag values are
// captured only on edges where the write enable is 1.
module tb_flags_register;
  import i281_pkg::*;
  logic clk = 0, rst, we;
  flags_t fin, fout, model;
  int checks = 0, failures = 0;

  flags_register dut (.clk, .rst, .write_enable(we), .flags_in(fin), .flags(fout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 1; fin = '1;
    @(posedge clk); #1;
    rst = 0; model = '0;
    checks++;
    if (fout !== model) begin failures++; $display("FAIL reset: %b", fout); end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); fin = flags_t'(4'($urandom));
      @(posedge clk); #1;
      if (we) model = fin;
      checks++;
      if (fout !== model) begin
        failures++;
        $display("FAIL step %0d: %b expected %b", i, fout, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
