// Testbench for horizontal_switch: every mode. HEAD forwards tile flits
// east, ACC adds a west and a tile flit pairwise (and waits for both), PASS
// forwards west flits, SINK ejects them, OFF holds everything.
`include "tb_check.svh"
module tb_horizontal_switch;
  import venus_pkg::*;
  logic clk = 0, rst_n = 0;
  hmode_e mode = HMODE_OFF;
  logic [ID_W-1:0] my_id = 10'd12;
  logic w_in_valid = 0, w_in_ready, tile_in_valid = 0, tile_in_ready;
  flit_t w_in = '0, tile_in = '0, e_out, tile_out;
  logic e_out_valid, e_out_ready = 1, tile_out_valid, tile_out_ready = 1;
  int checks = 0, failures = 0;
  flit_t got_e [$], got_t [$];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000)
  horizontal_switch #(.QDEPTH(4)) dut (.*);
  always @(posedge clk) if (rst_n) begin
    if (e_out_valid && e_out_ready) got_e.push_back(e_out);
    if (tile_out_valid && tile_out_ready) got_t.push_back(tile_out);
  end
  task automatic pw(int d); @(negedge clk); w_in_valid = 1; w_in = '{src: 10'd11, data: d}; @(negedge clk); w_in_valid = 0; endtask
  task automatic pt(int d); @(negedge clk); tile_in_valid = 1; tile_in = '{src: 10'd12, data: d}; @(negedge clk); tile_in_valid = 0; endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    pw(1); pt(2); repeat (3) @(negedge clk);
    `CHECK(got_e.size() == 0 && got_t.size() == 0, "off holds")
    mode = HMODE_ACC; repeat (3) @(negedge clk);
    `CHECK(got_e.size() == 1 && got_e[0].data == 3 && got_e[0].src == 10'd12, "acc 1+2")
    pw(100); repeat (3) @(negedge clk);
    `CHECK(got_e.size() == 1, "acc waits for tile psum")
    pt(-7); repeat (3) @(negedge clk);
    `CHECK(got_e.size() == 2 && got_e[1].data == 93, "acc 100-7")
    mode = HMODE_HEAD; pt(44); repeat (2) @(negedge clk);
    `CHECK(got_e.size() == 3 && got_e[2].data == 44, "head")
    mode = HMODE_PASS; pw(55); repeat (2) @(negedge clk);
    `CHECK(got_e.size() == 4 && got_e[3].data == 55 && got_e[3].src == 10'd11, "pass")
    mode = HMODE_SINK; pw(66); repeat (2) @(negedge clk);
    `CHECK(got_e.size() == 4 && got_t.size() == 1 && got_t[0].data == 66, "sink")
    `TB_FINISH
  end
endmodule
