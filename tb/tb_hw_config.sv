// Testbench for hw_config on a 4 x 4 array. The configuration written for
// P_C = 2 (two rings of two columns, the document's example), P_C = 4 (one
// ring per column), P_C = 8 (two rings per column) and P_C = 1 is compared
// entry by entry with the ring layout worked out here, and the write
// sequence must cover every router once in ROWS*COLS cycles.
`include "tb_check.svh"
module tb_hw_config;
  import venus_pkg::*;
  localparam int ROWS = 4, COLS = 4, NT = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done, cfg_we;
  logic [DIM_W-1:0] p_c = 0;
  logic [ID_W-1:0] cfg_idx;
  router_cfg_t cfg_data, got [NT];
  int checks = 0, failures = 0, writes = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  hw_config #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always @(posedge clk) if (rst_n && cfg_we) begin got[cfg_idx] = cfg_data; writes++; end
  function automatic router_cfg_t expect_cfg(int pc, int k);
    automatic int r = k / COLS, c = k % COLS;
    router_cfg_t e = '{v_src: VSRC_OFF, h_mode: (c == 0) ? HMODE_HEAD : HMODE_ACC, default: '0};
    case (pc)
      1: begin if (r > 0) e.v_src = VSRC_NORTH; else begin e.v_src = VSRC_DLINK; e.dlink_col = RC_W'(c == 0 ? 3 : c - 1); end end
      2: begin if (r > 0) e.v_src = VSRC_NORTH; else begin e.v_src = VSRC_DLINK; e.dlink_col = RC_W'(c % 2 == 0 ? c + 1 : c - 1); end end
      4: begin if (r > 0) e.v_src = VSRC_NORTH; else begin e.v_src = VSRC_RELINK; e.relink_row = 3; end end
      8: begin if (r % 2 == 1) e.v_src = VSRC_NORTH; else begin e.v_src = VSRC_RELINK; e.relink_row = RC_W'(r + 1); end end
      default: ;
    endcase
    return e;
  endfunction
  initial begin
    int pcs [4] = '{2, 4, 8, 1};
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (pcs[j]) begin
      automatic int cyc = 0;
      writes = 0;
      @(negedge clk); start = 1; p_c = DIM_W'(pcs[j]);
      @(negedge clk); start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      `CHECK(writes == NT && cyc == NT, $sformatf("P_C=%0d: %0d writes in %0d cycles", pcs[j], writes, cyc))
      for (int k = 0; k < NT; k++)
        `CHECK(got[k] == expect_cfg(pcs[j], k), $sformatf("P_C=%0d router %0d", pcs[j], k))
    end
    `TB_FINISH
  end
endmodule
