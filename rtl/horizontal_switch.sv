// Horizontal switch of a flexible router: the row-wise partial-sum path.
//
// The document accumulates partial sums horizontally along a row of tiles
// and lets the last router of the row hand out the finished output channel.
// This switch does that with two queued inputs (west and tile, QDEPTH flits
// each) and a mode from the router configuration:
//   HEAD  the tile's flits start the chain and go east;
//   ACC   a west flit and a tile flit are added and the sum goes east;
//   PASS  west flits go east unchanged;
//   SINK  west flits are ejected into the tile (the chain ends here);
//   OFF   nothing moves.
// Placing the adder in the switch and the mode set are this design's
// choices. Output flits carry the id of the tile that last touched them.
module horizontal_switch
  import venus_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  hmode_e          mode,
  input  logic [ID_W-1:0] my_id,
  input  logic            w_in_valid,
  output logic            w_in_ready,
  input  flit_t           w_in,
  input  logic            tile_in_valid,
  output logic            tile_in_ready,
  input  flit_t           tile_in,
  output logic            e_out_valid,
  input  logic            e_out_ready,
  output flit_t           e_out,
  output logic            tile_out_valid,
  input  logic            tile_out_ready,
  output flit_t           tile_out
);
  logic  wq_valid, wq_ready, tq_valid, tq_ready;
  flit_t wq, tq;

  flit_fifo #(.T(flit_t), .DEPTH(QDEPTH)) u_wq (
    .clk, .rst_n, .in_valid(w_in_valid), .in_ready(w_in_ready), .in_data(w_in),
    .out_valid(wq_valid), .out_ready(wq_ready), .out_data(wq));
  flit_fifo #(.T(flit_t), .DEPTH(QDEPTH)) u_tq (
    .clk, .rst_n, .in_valid(tile_in_valid), .in_ready(tile_in_ready), .in_data(tile_in),
    .out_valid(tq_valid), .out_ready(tq_ready), .out_data(tq));

  always_comb begin
    e_out_valid    = 1'b0;
    e_out          = wq;
    tile_out_valid = 1'b0;
    tile_out       = wq;
    wq_ready       = 1'b0;
    tq_ready       = 1'b0;
    unique case (mode)
      HMODE_HEAD: begin
        e_out_valid = tq_valid;
        e_out       = tq;
        tq_ready    = e_out_ready;
      end
      HMODE_ACC: begin
        e_out_valid = wq_valid && tq_valid;
        e_out       = '{src: my_id, data: wq.data + tq.data};
        wq_ready    = e_out_ready && tq_valid;
        tq_ready    = e_out_ready && wq_valid;
      end
      HMODE_PASS: begin
        e_out_valid = wq_valid;
        wq_ready    = e_out_ready;
      end
      HMODE_SINK: begin
        tile_out_valid = wq_valid;
        wq_ready       = tile_out_ready;
      end
      default: ;
    endcase
  end
endmodule
