// Venus accelerator, top level.
//
// A control unit, a DRAM path and a ROWS x COLS array of tiles on a flexible
// NoC (32 x 32 tiles of 4 x 4 PEs with 16 MACs each in the configuration the
// document evaluates). The host posts layer requests, the dataflow
// candidates and an instruction program through the host interface and
// starts the program. The instruction dispatcher then
//   * on IOP_CFG pops the oldest request from the request dispatcher, lets
//     the dataflow selection unit pick the parallel factors with the
//     smallest DRAM access volume, and lets the hardware configuration unit
//     write the ring configuration (P_C rings) into the NoC routers;
//   * on IOP_DMA loads DRAM words through a DRAM interface channel and the
//     crossbar into the distributed buffer of one tile;
//   * on IOP_TILE sends a tile command (weight load, compute, write back,
//     ring send, row send, receive) to one tile or to all of them.
// Ring traffic arrives in each tile's buffer through its reuse FIFO; row
// traffic (partial sums) is accumulated along each row and leaves at the
// right-hand edge on `res_*`, one port per row. The off-chip DRAM is not part
// of the design: its channels are ports (`mem_*`), each a read-request /
// in-order read-response pair.
//
// Top-level structure follows the architecture figure of the document; the
// glue between the control blocks (how a request reaches the selection unit,
// skipping configuration when no request is queued or no candidate fits)
// is this design's own.
module venus_top
  import venus_pkg::*;
#(
  parameter int unsigned ROWS      = 32,
  parameter int unsigned COLS      = 32,
  parameter int unsigned PR        = 4,
  parameter int unsigned PC        = 4,
  parameter int unsigned LANES     = 16,
  parameter int unsigned LB_DEPTH  = 160,
  parameter int unsigned DB_DEPTH  = 51200,
  parameter int unsigned FIFO_BANK = 16,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned NCH       = 4,
  parameter int unsigned MAX_CAND  = 19,
  parameter int unsigned IB_DEPTH  = 256,
  localparam int unsigned NT = ROWS * COLS,
  localparam int unsigned CW = (MAX_CAND > 1) ? $clog2(MAX_CAND) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host
  input  logic                      host_we,
  input  logic [7:0]                host_addr,
  input  logic [31:0]               host_wdata,
  output logic [31:0]               host_rdata,
  output logic                      prog_done,
  // off-chip DRAM channels
  output logic [NCH-1:0]            mem_req_valid,
  input  logic [NCH-1:0]            mem_req_ready,
  output logic [NCH-1:0][23:0]      mem_req_addr,
  input  logic [NCH-1:0]            mem_rsp_valid,
  output logic [NCH-1:0]            mem_rsp_ready,
  input  logic [NCH-1:0][DATA_W-1:0] mem_rsp_data,
  // results at the east edge of each row
  output logic [ROWS-1:0]           res_valid,
  input  logic [ROWS-1:0]           res_ready,
  output flit_t [ROWS-1:0]          res
);
  localparam int unsigned IBW = (IB_DEPTH > 1) ? $clog2(IB_DEPTH) : 1;

  // ---------------- control unit ----------------
  logic           start, req_push, cand_we, ib_we, ib_rd_en;
  layer_req_t     req, rq_out;
  logic [CW-1:0]  cand_idx, best_idx;
  dims_t          cand_p, best_p;
  logic [CW:0]    ncand;
  logic [IBW-1:0] ib_addr, ib_rd_addr;
  instr_t         ib_data, ib_rd_data;
  logic           prog_busy, sel_found, sel_busy, sel_done;
  logic [63:0]    best_da;
  logic [7:0]     pending, dropped;
  logic           rq_valid, cfg_start, cfg_done, skip_cfg;
  logic           hwc_busy, hwc_done, cfg_we;
  logic [ID_W-1:0] cfg_idx;
  router_cfg_t    cfg_data;
  logic [15:0]    issued;

  host_interface #(.MAX_CAND(MAX_CAND), .IB_DEPTH(IB_DEPTH)) u_host (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata,
    .prog_busy, .prog_done, .sel_found, .sel_idx(best_idx), .sel_da(best_da),
    .req_pending(pending), .start, .req_push, .req, .cand_we, .cand_idx, .cand_p, .ncand,
    .ib_we, .ib_addr, .ib_data);

  request_dispatcher u_req (
    .clk, .rst_n, .in_valid(req_push), .in_req(req),
    .out_valid(rq_valid), .out_ready(cfg_start), .out_req(rq_out),
    .pending, .dropped);

  dataflow_selection #(.MAX_CAND(MAX_CAND), .CDB(DB_DEPTH), .NUM_TILES(NT)) u_sel (
    .clk, .rst_n, .cand_we, .cand_idx, .cand_p, .ncand,
    .start(cfg_start && rq_valid), .layer(rq_out),
    .busy(sel_busy), .done(sel_done), .found(sel_found),
    .best_idx, .best_p, .best_da);

  hw_config #(.ROWS(ROWS), .COLS(COLS)) u_hwc (
    .clk, .rst_n, .start(sel_done && sel_found), .p_c(best_p[D_C]),
    .busy(hwc_busy), .done(hwc_done), .cfg_we, .cfg_idx, .cfg_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) skip_cfg <= 1'b0;
    else        skip_cfg <= (cfg_start && !rq_valid) || (sel_done && !sel_found);
  end
  assign cfg_done = hwc_done || skip_cfg;

  instruction_buffer #(.DEPTH(IB_DEPTH)) u_ib (
    .clk, .wr_en(ib_we), .wr_addr(ib_addr), .wr_data(ib_data),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_data(ib_rd_data));

  logic [NT-1:0]      tile_busy, tile_cmd_valid;
  tile_cmd_t          tile_cmd;
  logic [NCH-1:0]     dma_busy, dma_valid;
  logic [23:0]        dma_dram_addr;
  logic [ID_W-1:0]    dma_tile;
  logic [ADDR_W-1:0]  dma_db_addr;
  logic [LEN_W-1:0]   dma_len;

  instruction_dispatcher #(.NT(NT), .NCH(NCH), .IB_DEPTH(IB_DEPTH)) u_disp (
    .clk, .rst_n, .start, .busy(prog_busy), .done(prog_done), .issued,
    .ib_rd_en, .ib_rd_addr, .ib_rd_data,
    .tile_busy, .tile_cmd_valid, .tile_cmd,
    .dma_busy, .dma_valid, .dma_dram_addr, .dma_tile, .dma_db_addr, .dma_len,
    .cfg_start, .cfg_done);

  // ---------------- DRAM path ----------------
  logic [NCH-1:0]             x_valid, x_ready;
  logic [NCH-1:0][ID_W-1:0]   x_tile;
  logic [NCH-1:0][ADDR_W-1:0] x_addr;
  logic [NCH-1:0][DATA_W-1:0] x_data;

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    dram_interface #(.DRAM_AW(24)) u_dif (
      .clk, .rst_n,
      .job_valid(dma_valid[ch]), .job_ready(), .job_dram_addr(dma_dram_addr),
      .job_tile(dma_tile), .job_db_addr(dma_db_addr), .job_len(dma_len), .busy(dma_busy[ch]),
      .mem_req_valid(mem_req_valid[ch]), .mem_req_ready(mem_req_ready[ch]),
      .mem_req_addr(mem_req_addr[ch]), .mem_rsp_valid(mem_rsp_valid[ch]),
      .mem_rsp_ready(mem_rsp_ready[ch]), .mem_rsp_data(mem_rsp_data[ch]),
      .out_valid(x_valid[ch]), .out_ready(x_ready[ch]), .out_tile(x_tile[ch]),
      .out_addr(x_addr[ch]), .out_data(x_data[ch]));
  end

  logic [ROWS-1:0]             xo_valid;
  logic [ROWS-1:0][RC_W-1:0]   xo_col;
  logic [ROWS-1:0][ADDR_W-1:0] xo_addr;
  logic [ROWS-1:0][DATA_W-1:0] xo_data;

  crossbar #(.NIN(NCH), .NOUT(ROWS), .COLS(COLS)) u_xbar (
    .clk, .rst_n, .in_valid(x_valid), .in_ready(x_ready), .in_tile(x_tile),
    .in_addr(x_addr), .in_data(x_data),
    .out_valid(xo_valid), .out_col(xo_col), .out_addr(xo_addr), .out_data(xo_data));

  // ---------------- tiles and NoC ----------------
  logic  [NT-1:0] v_inj_valid, v_inj_ready, v_ej_valid, v_ej_ready;
  logic  [NT-1:0] h_inj_valid, h_inj_ready, h_ej_valid, h_ej_ready;
  flit_t [NT-1:0] v_inj, v_ej, h_inj, h_ej;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned K = r * COLS + c;
      tile #(.PR(PR), .PC(PC), .LANES(LANES), .LB_DEPTH(LB_DEPTH),
             .DB_DEPTH(DB_DEPTH), .FIFO_BANK(FIFO_BANK)) u_tile (
        .clk, .rst_n, .my_id(ID_W'(K)), .cmd_valid(tile_cmd_valid[K]), .cmd(tile_cmd), .busy(tile_busy[K]),
        .rx_count(),
        .dbw_valid(xo_valid[r] && xo_col[r] == RC_W'(c)), .dbw_addr(xo_addr[r]),
        .dbw_data(xo_data[r]),
        .v_inj_valid(v_inj_valid[K]), .v_inj_ready(v_inj_ready[K]), .v_inj(v_inj[K]),
        .v_ej_valid(v_ej_valid[K]), .v_ej_ready(v_ej_ready[K]), .v_ej(v_ej[K]),
        .h_inj_valid(h_inj_valid[K]), .h_inj_ready(h_inj_ready[K]), .h_inj(h_inj[K]),
        .h_ej_valid(h_ej_valid[K]), .h_ej_ready(h_ej_ready[K]), .h_ej(h_ej[K]));
    end
  end

  flexible_noc #(.ROWS(ROWS), .COLS(COLS), .QDEPTH(QDEPTH)) u_noc (
    .clk, .rst_n, .cfg_we, .cfg_idx, .cfg_data,
    .v_inj_valid, .v_inj_ready, .v_inj, .v_ej_valid, .v_ej_ready, .v_ej,
    .h_inj_valid, .h_inj_ready, .h_inj, .h_ej_valid, .h_ej_ready, .h_ej,
    .res_valid, .res_ready, .res);
endmodule
