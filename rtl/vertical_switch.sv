// Vertical switch of a flexible router: the column-wise ring stop.
//
// The document reduces a ring router to forwarding and ejecting/injecting
// in-flight packets. Both inputs, the ring and the tile, are queued (QDEPTH
// flits each, as the switch figure shows input queues). Each cycle:
//  * a ring flit injected by another tile is ejected to the tile and, in the
//    same cycle, forwarded to the next router of the ring (every tile of the
//    ring gets a copy);
//  * a ring flit that comes back to the tile that injected it has been round
//    the whole ring and is removed;
//  * otherwise, when the ring queue is empty, a flit from the tile is put on
//    the ring (in-flight traffic goes first).
// When `en` is low the router is not in a ring: tile flits are dropped and
// nothing is forwarded. Copy-on-forward and source removal are this design's
// choices.
module vertical_switch
  import venus_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [ID_W-1:0] my_id,
  input  logic            ring_in_valid,
  output logic            ring_in_ready,
  input  flit_t           ring_in,
  input  logic            tile_in_valid,
  output logic            tile_in_ready,
  input  flit_t           tile_in,
  output logic            ring_out_valid,
  input  logic            ring_out_ready,
  output flit_t           ring_out,
  output logic            tile_out_valid,
  input  logic            tile_out_ready,
  output flit_t           tile_out
);
  logic  rq_valid, rq_ready, tq_valid, tq_ready;
  flit_t rq, tq;

  flit_fifo #(.T(flit_t), .DEPTH(QDEPTH)) u_rq (
    .clk, .rst_n, .in_valid(ring_in_valid), .in_ready(ring_in_ready), .in_data(ring_in),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq));
  flit_fifo #(.T(flit_t), .DEPTH(QDEPTH)) u_tq (
    .clk, .rst_n, .in_valid(tile_in_valid), .in_ready(tile_in_ready), .in_data(tile_in),
    .out_valid(tq_valid), .out_ready(tq_ready), .out_data(tq));

  logic home;
  assign home = rq.src == my_id;

  always_comb begin
    ring_out_valid = 1'b0;
    ring_out       = rq;
    tile_out_valid = 1'b0;
    tile_out       = rq;
    rq_ready       = 1'b0;
    tq_ready       = 1'b0;
    if (!en) begin
      rq_ready = 1'b1;
      tq_ready = 1'b1;
    end else if (rq_valid) begin
      if (home) begin
        rq_ready = 1'b1;
      end else begin
        ring_out_valid = tile_out_ready;
        tile_out_valid = ring_out_ready;
        rq_ready       = ring_out_ready && tile_out_ready;
      end
    end else if (tq_valid) begin
      ring_out_valid = 1'b1;
      ring_out       = tq;
      tq_ready       = ring_out_ready;
    end
  end
endmodule
