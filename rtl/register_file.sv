// register_file: the four 8-bit i281 registers A, B, C and D.
//
// Two asynchronous read ports (port 0 and port 1, selected by
// REGISTERS_PORT0_SELECT and REGISTERS_PORT1_SELECT) and one write port
// (REGISTERS_WRITE_SELECT, REGISTERS_WRITE_ENABLE) that writes on the
// rising clock edge. Reading a register that is written in the same cycle
// returns the old value. All four registers are also brought out for
// display. A synchronous, active-high reset clears them.
//
// The register count, width, numbering (A=00 .. D=11) and port names
// follow the i281 description; the reset is this implementation's choice.
module register_file
  import i281_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [1:0]      port0_select,
  input  logic [1:0]      port1_select,
  output logic [DATA_W-1:0] port0,
  output logic [DATA_W-1:0] port1,
  input  logic            write_enable,
  input  logic [1:0]      write_select,
  input  logic [DATA_W-1:0] write_data,
  output logic [DATA_W-1:0] regs [4]
);
  always_ff @(posedge clk) begin
    if (rst)
      regs <= '{default: '0};
    else if (write_enable)
      regs[write_select] <= write_data;
  end

  assign port0 = regs[port0_select];
  assign port1 = regs[port1_select];
endmodule
