// data_memory: i281 data memory, DEPTH bytes.
//
// One asynchronous read port (rd_data = mem[addr]) feeds LOAD/LOADF in the
// same cycle; the write port stores wr_data at addr on the rising clock
// edge when wr_en is 1 (STORE, STOREF, INPUTD, INPUTDF or the external
// loader). A second asynchronous read port (dbg_addr/dbg_data) lets a
// display or a testbench watch memory without disturbing the CPU.
//
// Only the low ADDR_W bits of the CPU's 8-bit address are used. The
// 16-byte default depth is this implementation's choice: the instruction
// set allows 8-bit data addresses and the example programs use at most 10
// bytes. The debug port is an addition for observation.
module data_memory #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [7:0]        rd_data,
  input  logic              wr_en,
  input  logic [7:0]        wr_data,
  input  logic [ADDR_W-1:0] dbg_addr,
  output logic [7:0]        dbg_data
);
  logic [7:0] mem [DEPTH];

  assign rd_data  = mem[addr];
  assign dbg_data = mem[dbg_addr];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[addr] <= wr_data;
  end
endmodule
