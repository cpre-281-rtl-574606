// dec2to4: 2-to-4 decoder with enable.
//
// Each output is a three-input AND of En and w1/w0 or their complements,
// so y[k] is 1 exactly when en is 1 and {w1,w0} equals k. Purely
// combinational. The gate-level structure follows the 2-to-4 decoder drawn
// in the i281 course material; the bus form of w and y is this
// implementation's choice.
module dec2to4 (
  input  logic       en,
  input  logic [1:0] w,  // w[1] = w1, w[0] = w0
  output logic [3:0] y
);
  logic [1:0] wn;
  always_comb begin
    wn   = ~w;
    y[0] = en & wn[1] & wn[0];
    y[1] = en & wn[1] &  w[0];
    y[2] = en &  w[1] & wn[0];
    y[3] = en &  w[1] &  w[0];
  end
endmodule
