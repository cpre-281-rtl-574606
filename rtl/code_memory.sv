// code_memory: i281 instruction memory, DEPTH words of 16 bits.
//
// The read port is asynchronous: instr = mem[rd_addr] in the same cycle,
// so the single-cycle CPU fetches and executes one instruction per clock.
// The write port (INPUTC/INPUTCF, or the external loader) writes wr_data
// at wr_addr on the rising clock edge when wr_en is 1. A write and a read
// of the same word in one cycle return the old word for that cycle.
//
// The 64-word size and 16-bit width follow the i281 description ("space
// for only 64 instructions"). The asynchronous read and the single write
// port shared by INPUTC and the loader are this implementation's choice.
module code_memory #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [15:0]       instr,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [15:0]       wr_data
);
  logic [15:0] mem [DEPTH];

  assign instr = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_addr] <= wr_data;
  end
endmodule
