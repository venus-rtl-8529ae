// Testbench for flexible_noc on a 4 x 4 array. Rings are written through
// the configuration port and checked by traffic:
//   * two rings of two columns each (input channel split in two, as in the
//     document's weight-stationary example), closed by D-links;
//   * eight rings of two tiles, closed by Re-links.
// Every tile injects one flit on its ring; each tile must receive exactly
// one copy of every other member's flit and none from outside its ring.
// Each row then sums one partial sum per tile along the row (HEAD then ACC)
// and the east edge must deliver the row total.
`include "tb_check.svh"
module tb_flexible_noc;
  import venus_pkg::*;
  localparam int ROWS = 4, COLS = 4, NT = 16;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [ID_W-1:0] cfg_idx = 0;
  router_cfg_t cfg_data;
  logic [NT-1:0] v_inj_valid = 0, v_inj_ready, v_ej_valid, v_ej_ready = '1;
  logic [NT-1:0] h_inj_valid = 0, h_inj_ready, h_ej_valid, h_ej_ready = '1;
  flit_t [NT-1:0] v_inj, v_ej, h_inj, h_ej;
  logic [ROWS-1:0] res_valid, res_ready = '1;
  flit_t [ROWS-1:0] res;
  int checks = 0, failures = 0;
  int recv [NT][NT];      // recv[dst][src]
  int ring_of [NT];
  int rowsum [ROWS], rowgot [ROWS], rowcnt [ROWS];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  flexible_noc #(.ROWS(ROWS), .COLS(COLS), .QDEPTH(4)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NT; k++) if (v_ej_valid[k] && v_ej_ready[k]) recv[k][v_ej[k].src]++;
    for (int r = 0; r < ROWS; r++) if (res_valid[r]) begin rowgot[r] = int'(res[r].data); rowcnt[r]++; end
  end

  task automatic wcfg(int k, router_cfg_t c);
    @(negedge clk); cfg_we = 1; cfg_idx = ID_W'(k); cfg_data = c;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic ring_test(string name);
    foreach (recv[a, b]) recv[a][b] = 0;
    for (int k = 0; k < NT; k++) v_inj[k] = '{src: ID_W'(k), data: 32'(k)};
    @(negedge clk); v_inj_valid = '1;
    while (v_inj_valid != 0) begin
      automatic logic [NT-1:0] taken;
      @(posedge clk); taken = v_inj_valid & v_inj_ready;
      @(negedge clk); v_inj_valid &= ~taken;
    end
    repeat (60) @(negedge clk);
    for (int d = 0; d < NT; d++) for (int s = 0; s < NT; s++)
      `CHECK(recv[d][s] == ((d != s && ring_of[d] == ring_of[s]) ? 1 : 0),
             $sformatf("%s: tile %0d got %0d copies from %0d", name, d, recv[d][s], s))
  endtask

  initial begin
    router_cfg_t c;
    repeat (2) @(posedge clk); rst_n = 1;
    // two rings: columns {0,1} and {2,3}
    for (int k = 0; k < NT; k++) begin
      automatic int r = k / COLS, col = k % COLS;
      c = '{v_src: VSRC_NORTH, h_mode: (col == 0) ? HMODE_HEAD : HMODE_ACC, default: '0};
      if (r == 0) begin c.v_src = VSRC_DLINK; c.dlink_col = RC_W'((col % 2 == 0) ? col + 1 : col - 1); end
      ring_of[k] = col / 2;
      wcfg(k, c);
    end
    ring_test("2 rings");
    // partial sums along each row
    for (int r = 0; r < ROWS; r++) begin rowsum[r] = 0; rowcnt[r] = 0; end
    for (int k = 0; k < NT; k++) begin
      h_inj[k] = '{src: ID_W'(k), data: 32'(k * 3 + 1)};
      rowsum[k / COLS] += k * 3 + 1;
    end
    @(negedge clk); h_inj_valid = '1;
    while (h_inj_valid != 0) begin
      automatic logic [NT-1:0] taken;
      @(posedge clk); taken = h_inj_valid & h_inj_ready;
      @(negedge clk); h_inj_valid &= ~taken;
    end
    repeat (20) @(negedge clk);
    for (int r = 0; r < ROWS; r++)
      `CHECK(rowcnt[r] == 1 && rowgot[r] == rowsum[r], $sformatf("row %0d sum %0d want %0d", r, rowgot[r], rowsum[r]))
    // eight rings of two rows inside each column, closed by Re-links
    for (int k = 0; k < NT; k++) begin
      automatic int r = k / COLS, col = k % COLS;
      c = '{v_src: VSRC_NORTH, h_mode: HMODE_OFF, default: '0};
      if (r % 2 == 0) begin c.v_src = VSRC_RELINK; c.relink_row = RC_W'(r + 1); end
      ring_of[k] = col * 2 + r / 2;
      wcfg(k, c);
    end
    ring_test("8 rings");
    `TB_FINISH
  end
endmodule
