// Testbench for tile (2 x 2 PEs, 4 lanes, small buffers). Loads weights and
// activations into the distributed buffer through the DRAM write port, runs
// LDWT, COMP, WB and HSEND and compares the partial sums leaving on the
// horizontal port with dot products (and ReLU) computed here; runs WBRAW
// for the unclipped sums; checks VSEND on the vertical port; feeds ring
// flits in through the router port and reads them back after RECV, which
// exercises the reuse FIFO. Also checks the documented cycle counts of LDWT
// and COMP.
`include "tb_check.svh"
module tb_tile;
  import venus_pkg::*;
  localparam int PR = 2, PC = 2, LANES = 4, LEN = 3, NPE = PR * PC;
  logic clk = 0, rst_n = 0, cmd_valid = 0, busy;
  tile_cmd_t cmd;
  logic [LEN_W-1:0] rx_count;
  logic dbw_valid = 0; logic [ADDR_W-1:0] dbw_addr = 0; logic [DATA_W-1:0] dbw_data = 0;
  logic v_inj_valid, v_inj_ready = 1, v_ej_valid = 0, v_ej_ready, h_inj_valid, h_inj_ready = 1, h_ej_valid = 0, h_ej_ready;
  flit_t v_inj, v_ej = '0, h_inj, h_ej = '0;
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] W [NPE][LEN][LANES];
  logic signed [DATA_W-1:0] A [PR][LEN];
  int hout [$], vout [$];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  logic [ID_W-1:0] my_id = 10'd6;
  tile #(.PR(PR), .PC(PC), .LANES(LANES), .LB_DEPTH(16), .DB_DEPTH(1024), .FIFO_BANK(4)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (h_inj_valid && h_inj_ready) hout.push_back(int'(h_inj.data));
    if (v_inj_valid && v_inj_ready) begin vout.push_back(int'(v_inj.data)); if (v_inj.src != 10'd6) failures++; end
  end

  task automatic dbw(int a, int d);
    @(negedge clk); dbw_valid = 1; dbw_addr = ADDR_W'(a); dbw_data = DATA_W'(d);
    @(negedge clk); dbw_valid = 0;
  endtask
  task automatic run(tile_op_e op, int a, int n, output int cycles);
    @(negedge clk); cmd_valid = 1; cmd = '{op: op, addr: ADDR_W'(a), len: LEN_W'(n)};
    @(negedge clk); cmd_valid = 0; cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    int want [NPE][LANES];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < NPE; p++) for (int e = 0; e < LEN; e++) for (int l = 0; l < LANES; l++) begin
      W[p][e][l] = DATA_W'($urandom % 64) - 16'sd32;
      dbw((p * LEN + e) * LANES + l, W[p][e][l]);
    end
    for (int r = 0; r < PR; r++) for (int e = 0; e < LEN; e++) begin
      A[r][e] = DATA_W'($urandom % 64) - 16'sd32;
      dbw(100 + r * LEN + e, A[r][e]);
    end
    for (int p = 0; p < NPE; p++) for (int l = 0; l < LANES; l++) begin
      want[p][l] = 0;
      for (int e = 0; e < LEN; e++) want[p][l] += int'(W[p][e][l]) * int'(A[p / PC][e]);
    end
    run(TOP_LDWT, 0, LEN, cyc);
    `CHECK(cyc == NPE * LEN * LANES + 1, $sformatf("LDWT cycles %0d", cyc))
    run(TOP_COMP, 100, LEN, cyc);
    `CHECK(cyc == PR * LEN + PC + 4, $sformatf("COMP cycles %0d", cyc))
    run(TOP_WB, 200, 0, cyc);
    run(TOP_HSEND, 200, NPE * LANES, cyc);
    `CHECK(hout.size() == NPE * LANES, "HSEND count")
    for (int i = 0; i < NPE * LANES && i < hout.size(); i++)
      `CHECK(hout[i] == ((want[i / LANES][i % LANES] < 0) ? 0 : want[i / LANES][i % LANES]),
             $sformatf("relu psum %0d got %0d want %0d", i, hout[i], want[i / LANES][i % LANES]))
    hout.delete();
    run(TOP_WBRAW, 300, 0, cyc);
    run(TOP_HSEND, 300, NPE * LANES, cyc);
    for (int i = 0; i < NPE * LANES && i < hout.size(); i++)
      `CHECK(hout[i] == want[i / LANES][i % LANES], $sformatf("raw psum %0d", i))
    run(TOP_VSEND, 100, PR * LEN, cyc);
    `CHECK(vout.size() == PR * LEN, "VSEND count")
    for (int i = 0; i < PR * LEN && i < vout.size(); i++) `CHECK(vout[i] == int'(A[i / LEN][i % LEN]), "VSEND data")
    // ring data in through the reuse FIFO
    run(TOP_RECV, 500, 0, cyc);
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); v_ej_valid = 1; v_ej = '{src: 10'd1, data: 32'(1000 + i)};
      @(posedge clk); while (!v_ej_ready) @(posedge clk);
    end
    @(negedge clk); v_ej_valid = 0;
    repeat (20) @(negedge clk);
    `CHECK(rx_count == 10, $sformatf("rx_count %0d", rx_count))
    hout.delete();
    run(TOP_HSEND, 500, 10, cyc);
    for (int i = 0; i < 10; i++) `CHECK(hout.size() > i && hout[i] == 1000 + i, "received data stored")
    `TB_FINISH
  end
endmodule
