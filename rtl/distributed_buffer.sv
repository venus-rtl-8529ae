// Distributed buffer slice of one tile.
//
// The document gives each tile 100 KB of the distributed on-chip buffer;
// with 16-bit words that is 51200 words, the default DEPTH. The slice has one
// write port and one read port (this design's choice, so that incoming data
// can land while the tile reads). A read returns data one cycle after
// `rd_en`. A write and a read of the same address in one cycle return the
// old word.
module distributed_buffer
  import venus_pkg::*;
#(
  parameter int unsigned DEPTH = 51200,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              rd_en,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
