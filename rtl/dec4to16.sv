// dec4to16: 4-to-16 decoder built as a decoder tree.
//
// A first 2-to-4 decoder, driven by w3..w2 and the enable, selects one of
// four second-level 2-to-4 decoders; those all share w1..w0 and produce
// y[15:0]. y[k] is 1 exactly when en is 1 and w equals k. Purely
// combinational. The tree structure follows the course material's decoder
// tree; the bus form of the ports is this implementation's choice.
module dec4to16 (
  input  logic        en,
  input  logic [3:0]  w,
  output logic [15:0] y
);
  logic [3:0] group_en;

  dec2to4 u_root (.en(en), .w(w[3:2]), .y(group_en));

  for (genvar g = 0; g < 4; g++) begin : g_leaf
    dec2to4 u_leaf (.en(group_en[g]), .w(w[1:0]), .y(y[4*g +: 4]));
  end
endmodule
