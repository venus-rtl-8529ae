// Testbench for vertical_switch: a tile flit is injected onto the ring; a
// foreign ring flit is both ejected and forwarded, and only when both sides
// can take it; the switch's own flit coming back is removed; ring traffic
// goes before injection; with `en` low nothing moves out.
`include "tb_check.svh"
module tb_vertical_switch;
  import venus_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [ID_W-1:0] my_id = 10'd5;
  logic ring_in_valid = 0, ring_in_ready, tile_in_valid = 0, tile_in_ready;
  flit_t ring_in = '0, tile_in = '0, ring_out, tile_out;
  logic ring_out_valid, ring_out_ready = 1, tile_out_valid, tile_out_ready = 1;
  int checks = 0, failures = 0, n_ring = 0, n_tile = 0;
  flit_t got_ring [$], got_tile [$];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000)
  vertical_switch #(.QDEPTH(4)) dut (.*);
  always @(posedge clk) if (rst_n) begin
    if (ring_out_valid && ring_out_ready) got_ring.push_back(ring_out);
    if (tile_out_valid && tile_out_ready) got_tile.push_back(tile_out);
    if (ring_out_valid && !(tile_out_valid || !tile_out_ready) && ring_out.src != my_id)
      ; // forwarding without ejecting is checked below through the queues
  end
  task automatic push_ring(flit_t f); @(negedge clk); ring_in_valid = 1; ring_in = f; @(negedge clk); ring_in_valid = 0; endtask
  task automatic push_tile(flit_t f); @(negedge clk); tile_in_valid = 1; tile_in = f; @(negedge clk); tile_in_valid = 0; endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    push_tile('{src: 10'd5, data: 32'hA1});
    repeat (3) @(negedge clk);
    `CHECK(got_ring.size() == 1 && got_ring[0].data == 32'hA1 && got_tile.size() == 0, "inject goes on ring only")
    push_ring('{src: 10'd9, data: 32'hB2});
    repeat (3) @(negedge clk);
    `CHECK(got_ring.size() == 2 && got_ring[1].data == 32'hB2, "foreign flit forwarded")
    `CHECK(got_tile.size() == 1 && got_tile[0].data == 32'hB2, "foreign flit ejected")
    push_ring('{src: 10'd5, data: 32'hC3});
    repeat (3) @(negedge clk);
    `CHECK(got_ring.size() == 2 && got_tile.size() == 1, "own flit removed")
    // back-pressure on the tile side holds the flit on both sides
    tile_out_ready = 0;
    push_ring('{src: 10'd3, data: 32'hD4});
    repeat (3) @(negedge clk);
    `CHECK(got_ring.size() == 2 && got_tile.size() == 1, "held while tile busy")
    tile_out_ready = 1;
    repeat (2) @(negedge clk);
    `CHECK(got_ring.size() == 3 && got_tile.size() == 2, "released together")
    // ring traffic first: queue a ring flit and a tile flit in the same cycle
    ring_out_ready = 0;
    @(negedge clk); ring_in_valid = 1; ring_in = '{src: 10'd7, data: 32'hE5}; tile_in_valid = 1; tile_in = '{src: 10'd5, data: 32'hF6};
    @(negedge clk); ring_in_valid = 0; tile_in_valid = 0;
    ring_out_ready = 1;
    repeat (4) @(negedge clk);
    `CHECK(got_ring.size() == 5 && got_ring[3].data == 32'hE5 && got_ring[4].data == 32'hF6, "in-flight priority")
    // disabled: nothing leaves
    en = 0;
    push_ring('{src: 10'd7, data: 32'h11}); push_tile('{src: 10'd5, data: 32'h22});
    repeat (3) @(negedge clk);
    `CHECK(got_ring.size() == 5 && got_tile.size() == 3, "disabled drops")
    `TB_FINISH
  end
endmodule
