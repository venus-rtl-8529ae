// Testbench for flexible_router: the ring input is taken from the mesh,
// Re-link or D-link source named by the configuration and no other;
// the vertical output can be steered into the horizontal switch; the tile
// sees ejected ring flits.
`include "tb_check.svh"
module tb_flexible_router;
  import venus_pkg::*;
  logic clk = 0, rst_n = 0;
  router_cfg_t cfg;
  logic n_in_valid = 0, n_in_ready, relink_in_valid = 0, relink_in_ready, dlink_in_valid = 0, dlink_in_ready;
  flit_t n_in, relink_in, dlink_in, v_out, e_out, v_ej, h_ej, w_in = '0, v_inj = '0, h_inj = '0;
  logic v_out_valid, v_out_ready = 1, w_in_valid = 0, w_in_ready, e_out_valid, e_out_ready = 1;
  logic v_inj_valid = 0, v_inj_ready, v_ej_valid, v_ej_ready = 1, h_inj_valid = 0, h_inj_ready, h_ej_valid, h_ej_ready = 1;
  logic [ID_W-1:0] my_id = 10'd3;
  int checks = 0, failures = 0, nv = 0, ne = 0, nej = 0;
  logic [31:0] lastv, laste;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000)
  flexible_router #(.QDEPTH(4)) dut (.*);
  always @(posedge clk) if (rst_n) begin
    if (v_out_valid && v_out_ready) begin nv++; lastv = v_out.data; end
    if (e_out_valid && e_out_ready) begin ne++; laste = e_out.data; end
    if (v_ej_valid && v_ej_ready) nej++;
  end
  initial begin
    cfg = '{v_src: VSRC_NORTH, h_mode: HMODE_PASS, default: '0};
    n_in = '{src: 10'd1, data: 32'd10}; relink_in = '{src: 10'd1, data: 32'd20}; dlink_in = '{src: 10'd1, data: 32'd30};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      cfg.v_src = vsrc_e'(s);
      @(negedge clk); n_in_valid = 1; relink_in_valid = 1; dlink_in_valid = 1; #1;
      `CHECK(n_in_ready == (s == 0) && relink_in_ready == (s == 1) && dlink_in_ready == (s == 2), "only the selected source is taken")
      @(negedge clk); n_in_valid = 0; relink_in_valid = 0; dlink_in_valid = 0;
      repeat (3) @(negedge clk);
      `CHECK(nv == s + 1 && lastv == 32'(10 * (s + 1)), $sformatf("source %0d forwarded", s))
      `CHECK(nej == s + 1, "ejected to tile")
    end
    cfg.v_src = VSRC_NORTH; cfg.h_from_v = 1;
    @(negedge clk); n_in_valid = 1; n_in.data = 32'd77;
    @(negedge clk); n_in_valid = 0;
    repeat (4) @(negedge clk);
    `CHECK(nv == 3 && ne == 1 && laste == 32'd77, "Re-link into horizontal switch")
    `TB_FINISH
  end
endmodule
