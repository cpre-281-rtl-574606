// dec1to2: 1-to-2 decoder with enable.
//
// y[0] = En & ~w0, y[1] = En & w0: one AND gate per output, the w0 input
// inverted for y[0]. The outputs are one-hot while en is 1 and all zero
// while en is 0. Purely combinational. The gate structure is the one drawn
// for the 1-to-2 decoder of the i281 course material.
module dec1to2 (
  input  logic       en,
  input  logic       w,
  output logic [1:0] y
);
  always_comb begin
    y[0] = en & ~w;
    y[1] = en &  w;
  end
endmodule
