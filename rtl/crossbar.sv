// Crossbar between the DRAM interface channels and the tile array.
//
// The document puts an all-to-all crossbar at the DRAM interface to raise
// its endpoint bandwidth. Here NIN DRAM channels reach NOUT outputs, one per
// row of tiles; every input can reach every output and different outputs
// are served in the same cycle. Each input word carries its destination
// tile; the row part selects the output, and the output delivers the word
// with its column so that the tile of that column in the row stores it.
// Inputs that want the same output are served round-robin; losers see
// `in_ready` low. Per-row outputs and round-robin arbitration are this
// design's choices.
module crossbar
  import venus_pkg::*;
#(
  parameter int unsigned NIN  = 4,
  parameter int unsigned NOUT = 32,
  parameter int unsigned COLS = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NIN-1:0]                in_valid,
  output logic [NIN-1:0]                in_ready,
  input  logic [NIN-1:0][ID_W-1:0]      in_tile,
  input  logic [NIN-1:0][ADDR_W-1:0]    in_addr,
  input  logic [NIN-1:0][DATA_W-1:0]    in_data,
  output logic [NOUT-1:0]               out_valid,
  output logic [NOUT-1:0][RC_W-1:0]     out_col,
  output logic [NOUT-1:0][ADDR_W-1:0]   out_addr,
  output logic [NOUT-1:0][DATA_W-1:0]   out_data
);
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1;
  logic [NOUT-1:0][IW-1:0] last;   // last granted input, per output

  always_comb begin
    in_ready  = '0;
    out_valid = '0;
    out_col   = '0;
    out_addr  = '0;
    out_data  = '0;
    for (int o = 0; o < NOUT; o++) begin
      for (int k = 1; k <= NIN; k++) begin
        automatic int i = (int'(last[o]) + k) % NIN;
        if (!out_valid[o] && in_valid[i] && int'(in_tile[i]) / COLS == o) begin
          out_valid[o] = 1'b1;
          out_col[o]   = RC_W'(int'(in_tile[i]) % COLS);
          out_addr[o]  = in_addr[i];
          out_data[o]  = in_data[i];
          in_ready[i]  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= '0;
    else begin
      for (int o = 0; o < NOUT; o++)
        for (int i = 0; i < NIN; i++)
          if (in_valid[i] && in_ready[i] && int'(in_tile[i]) / COLS == o) last[o] <= IW'(i);
    end
  end
endmodule
