// Local buffer of a processing element.
//
// A single SRAM of DEPTH entries, each entry holding one weight per MAC lane
// (LANES x DATA_W bits), so that a single read feeds the whole MAC array. The
// document gives 5 KB per PE; with 16 lanes of 16 bits that is 160 entries,
// the default. Writes are one lane word at a time (the buffer is filled from
// the distributed buffer word by word); reads return a whole entry one cycle
// after `rd_en`.
module local_buffer
  import venus_pkg::*;
#(
  parameter int unsigned LANES = 16,
  parameter int unsigned DEPTH = 160,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [AW-1:0]                wr_addr,
  input  logic [LW-1:0]                wr_lane,
  input  logic [DATA_W-1:0]            wr_data,
  input  logic                         rd_en,
  input  logic [AW-1:0]                rd_addr,
  output logic [LANES-1:0][DATA_W-1:0] rd_data
);
  logic [LANES-1:0][DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_lane] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
