// Workload testbench: the dataflow selection unit at its default sizes
// (19 candidates, 51200-word buffer, 1024 tiles) on the layers of the four
// networks the document evaluates: VGG-16, AlexNet, ResNeXt-50 and
// GoogLeNet (batch 1; convolutions with their padded input sizes, strides
// folded into the host's sub-layer split, grouped convolutions as one
// group, fully connected layers as 1x1 convolutions on a 1x1 input). The
// layer sizes are the published network shapes, not taken from the
// document. Nineteen candidates, every one splitting C, are loaded; the
// sub-layer of each layer is K_1 = min(K,8), C_1 = min(C,8), the whole
// kernel, and X_1, Y_1 = min(X,16). For every layer the DRAM access volume
// of every candidate is recomputed here from the weight-stationary
// equations; the check is that a candidate fits, that the unit picks the
// reference winner and volume, and the cycle count.
`include "tb_check.svh"
module tb_workloads;
  import venus_pkg::*;
  localparam int MAX_CAND = 19, CDB = 51200, NUM_TILES = 1024;
  logic clk = 0, rst_n = 0, cand_we = 0, start = 0, busy, done, found;
  logic [4:0] cand_idx = 0, best_idx; logic [5:0] ncand = 0;
  dims_t cand_p = '0, best_p;
  layer_req_t layer;
  logic [63:0] best_da;
  int checks = 0, failures = 0;
  dims_t cands [19];
  int nlayers = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
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
    `CHECK(bi >= 0, "some candidate fits")
    if (bi >= 0) `CHECK(best_idx == 5'(bi) && best_da == 64'(best) && best_p == cands[bi],
                        $sformatf("winner %0d (%0d) want %0d (%0d)", best_idx, best_da, bi, best))
  endtask

  function automatic int mn(int a, int b); return a < b ? a : b; endfunction
  task automatic conv(int k, int c, int s, int x);
    select('{full: d7(1, k, c, s, s, x, x), sub: d7(1, mn(k, 8), mn(c, 8), s, s, mn(x, 16), mn(x, 16))}, 19);
    nlayers++;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    //             N   K    C   S  R   X   Y
    cands[0]  = d7(1,  32,  32, 1, 1,  1,  1);
    cands[1]  = d7(1,  16,  64, 1, 1,  1,  1);
    cands[2]  = d7(1,   8,   8, 1, 1,  4,  4);
    cands[3]  = d7(1,   4,  16, 1, 1,  4,  4);
    cands[4]  = d7(1,  64,  16, 1, 1,  1,  1);
    cands[5]  = d7(1,   1,  16, 1, 1,  8,  8);
    cands[6]  = d7(1,   2,   8, 1, 1,  8,  8);
    cands[7]  = d7(1,  16,  16, 1, 1,  2,  2);
    cands[8]  = d7(1,   4,   4, 1, 1,  8,  8);
    cands[9]  = d7(1,   1,   4, 1, 1, 16, 16);
    cands[10] = d7(1,   8,  32, 1, 1,  2,  2);
    cands[11] = d7(1, 256,   4, 1, 1,  1,  1);
    cands[12] = d7(1, 128,   8, 1, 1,  1,  1);
    cands[13] = d7(1,   2,   2, 1, 1, 16, 16);
    cands[14] = d7(1,   1,   2, 1, 1, 32, 16);
    cands[15] = d7(1, 512,   2, 1, 1,  1,  1);
    cands[16] = d7(1,  32,   8, 1, 1,  2,  2);
    cands[17] = d7(1,  64,   4, 1, 1,  2,  2);
    cands[18] = d7(1,  64,  64, 1, 1,  1,  1);   // 4096 tiles: never fits
    for (int i = 0; i < 19; i++) begin
      @(negedge clk); cand_we = 1; cand_idx = 5'(i); cand_p = cands[i];
    end
    @(negedge clk); cand_we = 0;
    // VGG-16: 13 convolutions, 3 fully connected layers
    conv(64, 3, 3, 226);    conv(64, 64, 3, 226);
    conv(128, 64, 3, 114);  conv(128, 128, 3, 114);
    conv(256, 128, 3, 58);  conv(256, 256, 3, 58);  conv(256, 256, 3, 58);
    conv(512, 256, 3, 30);  conv(512, 512, 3, 30);  conv(512, 512, 3, 30);
    conv(512, 512, 3, 16);  conv(512, 512, 3, 16);  conv(512, 512, 3, 16);
    conv(4096, 25088, 1, 1); conv(4096, 4096, 1, 1); conv(1000, 4096, 1, 1);
    // AlexNet
    conv(96, 3, 11, 227);   conv(256, 48, 5, 31);   conv(384, 256, 3, 15);
    conv(384, 192, 3, 15);  conv(256, 192, 3, 15);
    conv(4096, 9216, 1, 1); conv(4096, 4096, 1, 1); conv(1000, 4096, 1, 1);
    // ResNeXt-50 (32x4d): stem and the three convolutions of the first and last stage
    conv(64, 3, 7, 230);    conv(128, 64, 1, 56);   conv(4, 4, 3, 58);     conv(256, 128, 1, 56);
    conv(1024, 2048, 1, 7); conv(32, 32, 3, 9);     conv(2048, 1024, 1, 7); conv(1000, 2048, 1, 1);
    // GoogLeNet: stem, inception 3a, a 5b branch, classifier
    conv(64, 3, 7, 230);    conv(64, 64, 1, 56);    conv(192, 64, 3, 58);
    conv(64, 192, 1, 28);   conv(96, 192, 1, 28);   conv(128, 96, 3, 30);
    conv(16, 192, 1, 28);   conv(32, 16, 5, 32);    conv(384, 192, 3, 9);  conv(1000, 1024, 1, 1);
    $display("layers selected: %0d", nlayers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
