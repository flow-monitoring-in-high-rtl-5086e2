// fmu_ram: one table of the FMU, a simple dual-port memory of DEPTH words.
//
// One write port and one read port, both synchronous to clk. The read data
// is registered: the word at rd_addr in cycle t appears on rd_data in cycle
// t + 1. A read and a write to the same address in the same cycle return the
// old word (read-first); the table logic around it forwards the new word
// itself. The memory has no reset; the table logic clears it by writing
// zeros to every address. This maps onto block RAM, which is what limits
// the table size on the FPGA the design was first built for.
module fmu_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
