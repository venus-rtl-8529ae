// End-to-end testbench for venus_top on a reduced array (2 x 4 tiles of
// 2 x 2 PEs with 4 MAC lanes, 1024-word buffers, two DRAM channels).
//
// The host loads three dataflow candidates (one needs more tiles than the
// array has), posts two layer requests and a program, and starts it:
//   CFG     -> selection must pick candidate 0 (P_C = 2, two rings of two
//              columns, closed by D-links); expected volumes were worked out
//              separately from the document's equations
//   DMA x16 -> weights and activations of every tile from the DRAM model,
//              over both channels and the crossbar
//   LDWT, COMP, WBRAW          -> per-PE partial sums in every tile
//   RECV, VSEND                -> activations circulate on the rings
//   HSEND  -> partial sums accumulate along each row and leave at the east
//             edge; compared with sums computed here from the DRAM contents
//   CFG     -> second request picks candidate 1 (P_C = 4: one ring per
//              column, closed by Re-links), then RECV, VSEND again
//   END
// It counts each mechanism (crossbar contention, DRAM stalls, ring copies,
// D-link and Re-link rings, row accumulation, result back-pressure,
// reconfiguration, infeasible candidate skipped) and fails any that never
// happened.
`include "tb_check.svh"
module tb_venus_top;
  import venus_pkg::*;
  localparam int ROWS = 2, COLS = 4, NT = 8, PR = 2, PC = 2, LANES = 4, LEN = 3, NCH = 2;
  localparam int NPE = PR * PC, WN = NPE * LEN * LANES, AN = PR * LEN;
  logic clk = 0, rst_n = 0, host_we = 0;
  logic [7:0] host_addr = 0; logic [31:0] host_wdata = 0, host_rdata;
  logic prog_done;
  logic [NCH-1:0] mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  logic [NCH-1:0][23:0] mem_req_addr; logic [NCH-1:0][DATA_W-1:0] mem_rsp_data;
  logic [ROWS-1:0] res_valid, res_ready = '1; flit_t [ROWS-1:0] res;
  int checks = 0, failures = 0;
  int n_xbar_conflict = 0, n_dram_stall = 0, n_ring_copy = 0, n_dlink = 0, n_relink = 0;
  int n_row_acc = 0, n_res_stall = 0, n_reconfig = 0;
  int sel_idx [$]; longint sel_da [$];
  int rowres [ROWS][$];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)

  venus_top #(.ROWS(ROWS), .COLS(COLS), .PR(PR), .PC(PC), .LANES(LANES), .LB_DEPTH(16),
              .DB_DEPTH(1024), .FIFO_BANK(4), .QDEPTH(4), .NCH(NCH), .MAX_CAND(19), .IB_DEPTH(256)) dut (.*);

  for (genvar ch = 0; ch < NCH; ch++) begin : g_mem
    dram_model #(.LAT(5)) u_mem (.clk, .rst_n, .req_valid(mem_req_valid[ch]), .req_ready(mem_req_ready[ch]),
      .req_addr(mem_req_addr[ch]), .rsp_valid(mem_rsp_valid[ch]), .rsp_ready(mem_rsp_ready[ch]), .rsp_data(mem_rsp_data[ch]));
  end

  function automatic int f(int a); return ((a * 37 + 11) % 61) - 30; endfunction
  function automatic int wt(int t, int p, int e, int l); return f(1000 + t * 64 + (p * LEN + e) * LANES + l); endfunction
  function automatic int ac(int t, int r, int e); return f(5000 + t * 16 + r * LEN + e); endfunction

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if ((dut.x_valid & ~dut.x_ready) != 0) n_xbar_conflict++;
    if ((mem_req_valid & ~mem_req_ready) != 0) n_dram_stall++;
    for (int k = 0; k < NT; k++) if (dut.v_ej_valid[k] && dut.v_ej_ready[k]) n_ring_copy++;
    for (int r = 0; r < ROWS; r++) begin
      if (res_valid[r] && res_ready[r]) begin rowres[r].push_back(int'($signed(res[r].data))); n_row_acc++; end
      if (res_valid[r] && !res_ready[r]) n_res_stall++;
    end
    if (dut.hwc_done) begin
      n_reconfig++;
      for (int k = 0; k < NT; k++) begin
        if (dut.u_noc.cfg[k].v_src == VSRC_DLINK) n_dlink++;
        if (dut.u_noc.cfg[k].v_src == VSRC_RELINK) n_relink++;
      end
    end
    if (dut.sel_done) begin sel_idx.push_back(int'(dut.best_idx)); sel_da.push_back(longint'(dut.best_da)); end
  end
  always @(negedge clk) res_ready <= ROWS'($urandom);

  task automatic wr(int a, int d); @(negedge clk); host_we = 1; host_addr = 8'(a); host_wdata = 32'(d); @(negedge clk); host_we = 0; endtask
  task automatic dims(int base, int n, int k, int c, int s, int r, int x, int y);
    wr(base + 0, n); wr(base + 1, k); wr(base + 2, c); wr(base + 3, s); wr(base + 4, r); wr(base + 5, x); wr(base + 6, y);
  endtask
  task automatic instr(iop_e op, tile_op_e top, int tile, int addr, int len, int ext);
    instr_t i = '{op: op, top: top, tile: ID_W'(tile), addr: ADDR_W'(addr), len: LEN_W'(len), ext: 24'(ext)};
    wr(8'h31, i[31:0]); wr(8'h32, i[63:32]); wr(8'h33, 32'(i[73:64])); wr(8'h34, 0);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // candidates: P_N P_K P_C P_S P_R P_X P_Y
    wr(8'h20, 0); dims(8'h21, 1, 1, 2, 1, 1, 2, 2); wr(8'h28, 0);
    wr(8'h20, 1); dims(8'h21, 1, 1, 4, 1, 1, 2, 1); wr(8'h28, 0);
    wr(8'h20, 2); dims(8'h21, 1, 2, 4, 1, 1, 2, 1); wr(8'h28, 0);   // 16 tiles: does not fit
    wr(8'h29, 3);
    // two layer requests
    dims(8'h10, 1, 4, 2, 3, 3, 6, 12); dims(8'h18, 1, 2, 1, 3, 3, 6, 6); wr(8'h1F, 0);
    dims(8'h10, 1, 4, 4, 3, 3, 18, 6); dims(8'h18, 1, 2, 1, 3, 3, 6, 6); wr(8'h1F, 0);
    // program
    wr(8'h30, 0);
    instr(IOP_CFG, TOP_NOP, 0, 0, 0, 0);
    for (int t = 0; t < NT; t++) begin
      instr(IOP_DMA, tile_op_e'(t % 2), t, 0, WN, 1000 + t * 64);
      instr(IOP_DMA, tile_op_e'(t % 2), t, 100, AN, 5000 + t * 16);
    end
    instr(IOP_WAIT, TOP_NOP, 0, 0, 0, 0);
    instr(IOP_TILE, TOP_LDWT, BCAST, 0, LEN, 0);
    instr(IOP_TILE, TOP_COMP, BCAST, 100, LEN, 0);
    instr(IOP_TILE, TOP_WBRAW, BCAST, 200, 0, 0);
    instr(IOP_TILE, TOP_RECV, BCAST, 600, 0, 0);
    instr(IOP_TILE, TOP_VSEND, BCAST, 100, AN, 0);
    instr(IOP_WAIT, TOP_NOP, 0, 0, 0, 0);
    instr(IOP_TILE, TOP_HSEND, BCAST, 200, NPE * LANES, 0);
    instr(IOP_WAIT, TOP_NOP, 0, 0, 0, 0);
    instr(IOP_CFG, TOP_NOP, 0, 0, 0, 0);
    instr(IOP_TILE, TOP_RECV, BCAST, 700, 0, 0);
    instr(IOP_TILE, TOP_VSEND, BCAST, 100, AN, 0);
    instr(IOP_WAIT, TOP_NOP, 0, 0, 0, 0);
    instr(IOP_END, TOP_NOP, 0, 0, 0, 0);
    wr(8'h00, 1);
    host_addr = 8'h00;
    do @(negedge clk); while (host_rdata[1] == 1'b0);
    repeat (200) @(negedge clk);

    // dataflow selection (expected volumes from the equations, worked out separately)
    `CHECK(sel_idx.size() == 2, "two selections")
    if (sel_idx.size() == 2) begin
      `CHECK(sel_idx[0] == 0 && sel_da[0] == 1736, $sformatf("first selection %0d / %0d", sel_idx[0], sel_da[0]))
      `CHECK(sel_idx[1] == 1 && sel_da[1] == 1552, $sformatf("second selection %0d / %0d", sel_idx[1], sel_da[1]))
    end
    // row-accumulated partial sums
    for (int r = 0; r < ROWS; r++) begin
      `CHECK(rowres[r].size() == NPE * LANES, $sformatf("row %0d: %0d results", r, rowres[r].size()))
      for (int j = 0; j < NPE * LANES && j < rowres[r].size(); j++) begin
        automatic int want = 0;
        for (int c = 0; c < COLS; c++) begin
          automatic int t = r * COLS + c, p = j / LANES, l = j % LANES;
          for (int e = 0; e < LEN; e++) want += wt(t, p, e, l) * ac(t, p / PC, e);
        end
        `CHECK(rowres[r][j] == want, $sformatf("row %0d result %0d: %0d want %0d", r, j, rowres[r][j], want))
      end
    end
    // ring 1 (P_C = 2): each tile holds the activations of the 3 other tiles of its two-column ring
    for (int t = 0; t < NT; t++) begin
      automatic int got = 0, want = 0;
      for (int s = 0; s < NT; s++) if (s != t && (s % COLS) / 2 == (t % COLS) / 2)
        for (int i = 0; i < AN; i++) want += ac(s, i / LEN, i % LEN);
      case (t)
        0: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[0].g_col[0].u_tile.u_db.mem[600 + i]));
        1: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[0].g_col[1].u_tile.u_db.mem[600 + i]));
        2: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[0].g_col[2].u_tile.u_db.mem[600 + i]));
        3: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[0].g_col[3].u_tile.u_db.mem[600 + i]));
        4: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[1].g_col[0].u_tile.u_db.mem[600 + i]));
        5: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[1].g_col[1].u_tile.u_db.mem[600 + i]));
        6: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[1].g_col[2].u_tile.u_db.mem[600 + i]));
        default: for (int i = 0; i < 3 * AN; i++) got += int'($signed(dut.g_row[1].g_col[3].u_tile.u_db.mem[600 + i]));
      endcase
      `CHECK(got == want, $sformatf("tile %0d ring data sum %0d want %0d", t, got, want))
    end
    // ring 2 (P_C = 4): each tile received exactly the AN words of its column partner
    `CHECK(dut.g_row[0].g_col[0].u_tile.rx_count == AN && dut.g_row[1].g_col[3].u_tile.rx_count == AN, "column ring counts")
    for (int i = 0; i < AN; i++) begin
      `CHECK(int'($signed(dut.g_row[0].g_col[2].u_tile.u_db.mem[700 + i])) == ac(6, i / LEN, i % LEN), "column ring data 2<-6")
      `CHECK(int'($signed(dut.g_row[1].g_col[1].u_tile.u_db.mem[700 + i])) == ac(1, i / LEN, i % LEN), "column ring data 5<-1")
    end
    // every mechanism happened
    $display("mechanisms: xbar_conflict=%0d dram_stall=%0d ring_copy=%0d dlink=%0d relink=%0d row_acc=%0d res_stall=%0d reconfig=%0d",
             n_xbar_conflict, n_dram_stall, n_ring_copy, n_dlink, n_relink, n_row_acc, n_res_stall, n_reconfig);
    `CHECK(n_xbar_conflict > 0, "crossbar contention")
    `CHECK(n_dram_stall > 0, "DRAM stall")
    `CHECK(n_ring_copy == NT * 3 * AN + NT * AN, $sformatf("ring copies %0d", n_ring_copy))
    `CHECK(n_dlink == 4, "D-link rings")
    `CHECK(n_relink == 4, "Re-link rings")
    `CHECK(n_row_acc == ROWS * NPE * LANES, "row accumulation")
    `CHECK(n_res_stall > 0, "result back-pressure")
    `CHECK(n_reconfig == 2, "reconfiguration")
    `TB_FINISH
  end
endmodule
