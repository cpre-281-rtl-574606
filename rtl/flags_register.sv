// flags_register: holds the i281 zero, negative, overflow and carry flags.
//
// On the rising clock edge the register loads the ALU's flags when
// FLAGS_WRITE_ENABLE is 1 and keeps its value otherwise; the branch
// conditions read it during the following instructions. A synchronous,
// active-high reset clears all flags.
//
// The flags and their write enable follow the i281 control table; the
// reset is this implementation's choice.
module flags_register
  import i281_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   write_enable,
  input  flags_t flags_in,
  output flags_t flags
);
  always_ff @(posedge clk) begin
    if (rst)
      flags <= '0;
    else if (write_enable)
      flags <= flags_in;
  end
endmodule
