// Testbench for dataflow_selection with the default table size, buffer
// capacity and tile count. Layers shaped like VGG-16 convolutions are scored
// against a set of candidates; the DRAM access volume of every candidate is
// recomputed here from the document's equations, and the winner, its
// volume and the cycle count are checked. Also checks that a candidate
// needing too many tiles is skipped and that a sub-layer too large for the
// buffer yields no winner.
`include "tb_check.svh"
module tb_dataflow_selection;
  import venus_pkg::*;
  localparam int MAX_CAND = 19, CDB = 51200, NUM_TILES = 1024;
  logic clk = 0, rst_n = 0, cand_we = 0, start = 0, busy, done, found;
  logic [4:0] cand_idx = 0, best_idx; logic [5:0] ncand = 0;
  dims_t cand_p = '0, best_p;
  layer_req_t layer;
  logic [63:0] best_da;
  int checks = 0, failures = 0;
  dims_t cands [8];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  dataflow_selection #(.MAX_CAND(MAX_CAND), .CDB(CDB), .NUM_TILES(NUM_TILES)) dut (.*);

  function automatic dims_t d7(int n, int k, int c, int s, int r, int x, int y);
    dims_t v; v[D_N] = DIM_W'(n); v[D_K] = DIM_W'(k); v[D_C] = DIM_W'(c); v[D_S] = DIM_W'(s);
    v[D_R] = DIM_W'(r); v[D_X] = DIM_W'(x); v[D_Y] = DIM_W'(y); return v;
  endfunction
  function automatic longint cd(longint a, longint b); return (a + b - 1) / b; endfunction
  // reference score; -1 when infeasible
  function automatic longint score(layer_req_t L, dims_t P);
    longint f [9], s [9], p [9], q [9], vw, vi, vp, rw, ri, rp, dv, pt;
    for (int d = 0; d < 7; d++) begin f[d] = L.full[d]; s[d] = L.sub[d]; p[d] = P[d]; end
    f[7] = f[5] - f[3] + 1; s[7] = s[5] - s[3] + 1; p[7] = p[5];
    f[8] = f[6] - f[4] + 1; s[8] = s[6] - s[4] + 1; p[8] = p[6];
    for (int d = 0; d < 9; d++) q[d] = cd(f[d], s[d] * p[d]);
    vw = s[1]*p[1]*s[2]*p[2]*s[3]*p[3]*s[4]*p[4];
    vi = s[0]*p[0]*s[2]*p[2]*s[5]*p[5]*s[6]*p[6];
    vp = s[0]*p[0]*s[1]*p[1]*s[7]*p[7]*s[8]*p[8];
    rw = q[1]*q[2]*q[3]*q[4];
    ri = q[0]*q[1]*q[2]*q[3]*q[4]*q[7]*q[8];
    rp = q[0]*q[1]*q[3]*q[4]*q[7]*q[8]*(2*q[2]-1);
    dv = s[1]*s[2]*s[3]*s[4] + s[0]*s[2]*s[5]*s[6] + s[0]*s[1]*s[7]*s[8];
    pt = p[0]*p[1]*p[2]*p[3]*p[4]*p[5]*p[6];
    if (dv > CDB || pt > NUM_TILES) return -1;
    return vw*rw + vi*ri + vp*rp;
  endfunction

  task automatic select(layer_req_t L, int n);
    longint best = -1; int bi = -1, cyc = 0;
    for (int i = 0; i < n; i++) begin
      longint v = score(L, cands[i]);
      if (v >= 0 && (best < 0 || v < best)) begin best = v; bi = i; end
    end
    @(negedge clk); layer = L; start = 1; ncand = 6'(n);
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    `CHECK(cyc == n + 1, $sformatf("cycles %0d for %0d candidates", cyc, n))
    `CHECK(found == (bi >= 0), "found flag")
    if (bi >= 0) `CHECK(best_idx == 5'(bi) && best_da == 64'(best) && best_p == cands[bi],
                        $sformatf("winner %0d (%0d) want %0d (%0d)", best_idx, best_da, bi, best))
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    //             N  K   C  S  R  X  Y
    cands[0] = d7(1, 32, 32, 1, 1, 1, 1);   // channel-parallel
    cands[1] = d7(2, 16, 32, 1, 1, 1, 1);
    cands[2] = d7(1, 16, 2, 2, 1, 4, 4);    // spatial + channel mix
    cands[3] = d7(4, 4, 4, 1, 1, 4, 4);
    cands[4] = d7(1, 64, 32, 1, 1, 1, 1);   // 2048 tiles: infeasible
    cands[5] = d7(1, 8, 2, 1, 1, 8, 8);
    cands[6] = d7(2, 2, 2, 2, 2, 4, 4);
    cands[7] = d7(1, 1, 1, 1, 1, 1, 1);
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); cand_we = 1; cand_idx = 5'(i); cand_p = cands[i];
    end
    @(negedge clk); cand_we = 0;
    // VGG-16 conv1_1 (224x224 with padding), conv3_1, conv5_1, batch 4
    select('{full: d7(4, 64, 3, 3, 3, 226, 226),   sub: d7(1, 2, 1, 3, 3, 16, 16)}, 8);
    select('{full: d7(4, 256, 128, 3, 3, 58, 58), sub: d7(1, 4, 4, 3, 3, 8, 8)}, 8);
    select('{full: d7(4, 512, 512, 3, 3, 16, 16), sub: d7(1, 8, 8, 3, 3, 4, 4)}, 8);
    select('{full: d7(4, 512, 512, 3, 3, 16, 16), sub: d7(1, 8, 8, 3, 3, 4, 4)}, 3);
    // sub-layer too large for the buffer: no winner
    select('{full: d7(1, 512, 512, 3, 3, 58, 58), sub: d7(1, 64, 64, 3, 3, 58, 58)}, 8);
    `TB_FINISH
  end
endmodule
