// Flexible NoC: ROWS x COLS flexible routers, one per tile.
//
// Links, as in the architecture figure: vertical mesh links (each router to
// the one below), horizontal mesh links (each router to the one on its
// right), a reconfigurable bypass link (Re-link) per router that can take the
// ring output of any router of the same column, and a diagonal link
// (D-link) per router that can take the ring output of the bottom router of
// any column. With these, the configuration can cut the array into rings of
// any size and place: data flows down a column and the last tile of a column
// segment reaches the top of the ring through a Re-link or, for rings over
// several columns, through a D-link to the top of the next column.
// The exact reach of the Re-link and D-link is this design's choice; the
// document only says that they bridge non-adjacent routers.
//
// Each router has a configuration register, written one router per cycle
// through `cfg_we` (the configuration instructions of the document); reset
// leaves every router switched off. The right-hand end of each row is a
// result port (`res_*`): it carries the finished output channel of that row.
module flexible_noc
  import venus_pkg::*;
#(
  parameter int unsigned ROWS   = 32,
  parameter int unsigned COLS   = 32,
  parameter int unsigned QDEPTH = 4,
  localparam int unsigned NT = ROWS * COLS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration
  input  logic                  cfg_we,
  input  logic [ID_W-1:0]       cfg_idx,
  input  router_cfg_t           cfg_data,
  // tile side, one entry per tile (index = row * COLS + col)
  input  logic [NT-1:0]         v_inj_valid,
  output logic [NT-1:0]         v_inj_ready,
  input  flit_t [NT-1:0]        v_inj,
  output logic [NT-1:0]         v_ej_valid,
  input  logic [NT-1:0]         v_ej_ready,
  output flit_t [NT-1:0]        v_ej,
  input  logic [NT-1:0]         h_inj_valid,
  output logic [NT-1:0]         h_inj_ready,
  input  flit_t [NT-1:0]        h_inj,
  output logic [NT-1:0]         h_ej_valid,
  input  logic [NT-1:0]         h_ej_ready,
  output flit_t [NT-1:0]        h_ej,
  // east edge of every row
  output logic [ROWS-1:0]       res_valid,
  input  logic [ROWS-1:0]       res_ready,
  output flit_t [ROWS-1:0]      res
);
  router_cfg_t [NT-1:0] cfg;
  logic  [NT-1:0] vo_valid, vo_ready, n_ready, rl_ready, dl_ready;
  logic  [NT-1:0] n_valid, rl_valid, dl_valid, w_valid, w_ready, eo_valid, eo_ready;
  flit_t [NT-1:0] vo, n_fl, rl_fl, dl_fl, w_fl, eo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NT; k++) cfg[k] <= '{v_src: VSRC_OFF, h_mode: HMODE_OFF, default: '0};
    end else if (cfg_we && cfg_idx < ID_W'(NT)) begin
      cfg[cfg_idx] <= cfg_data;
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int unsigned K = r * COLS + c;
      // mesh links
      if (r == 0) begin : g_top
        assign n_valid[K] = 1'b0;
        assign n_fl[K]    = '0;
      end else begin : g_nt
        assign n_valid[K] = vo_valid[K-COLS];
        assign n_fl[K]    = vo[K-COLS];
      end
      if (c == 0) begin : g_west
        assign w_valid[K] = 1'b0;
        assign w_fl[K]    = '0;
      end else begin : g_nw
        assign w_valid[K] = eo_valid[K-1];
        assign w_fl[K]    = eo[K-1];
      end
      if (c == COLS - 1) begin : g_east
        assign res_valid[r] = eo_valid[K];
        assign res[r]       = eo[K];
        assign eo_ready[K]  = res_ready[r];
      end else begin : g_ne
        assign eo_ready[K]  = w_ready[K+1];
      end
      // Re-link: ring output of a router of the same column
      assign rl_valid[K] = vo_valid[cfg[K].relink_row * COLS + c];
      assign rl_fl[K]    = vo[cfg[K].relink_row * COLS + c];
      // D-link: ring output of the bottom router of a column
      assign dl_valid[K] = vo_valid[(ROWS-1) * COLS + cfg[K].dlink_col];
      assign dl_fl[K]    = vo[(ROWS-1) * COLS + cfg[K].dlink_col];

      flexible_router #(.QDEPTH(QDEPTH)) u_router (
        .clk, .rst_n, .my_id(ID_W'(K)), .cfg(cfg[K]),
        .n_in_valid(n_valid[K]), .n_in_ready(n_ready[K]), .n_in(n_fl[K]),
        .relink_in_valid(rl_valid[K]), .relink_in_ready(rl_ready[K]), .relink_in(rl_fl[K]),
        .dlink_in_valid(dl_valid[K]), .dlink_in_ready(dl_ready[K]), .dlink_in(dl_fl[K]),
        .v_out_valid(vo_valid[K]), .v_out_ready(vo_ready[K]), .v_out(vo[K]),
        .w_in_valid(w_valid[K]), .w_in_ready(w_ready[K]), .w_in(w_fl[K]),
        .e_out_valid(eo_valid[K]), .e_out_ready(eo_ready[K]), .e_out(eo[K]),
        .v_inj_valid(v_inj_valid[K]), .v_inj_ready(v_inj_ready[K]), .v_inj(v_inj[K]),
        .v_ej_valid(v_ej_valid[K]), .v_ej_ready(v_ej_ready[K]), .v_ej(v_ej[K]),
        .h_inj_valid(h_inj_valid[K]), .h_inj_ready(h_inj_ready[K]), .h_inj(h_inj[K]),
        .h_ej_valid(h_ej_valid[K]), .h_ej_ready(h_ej_ready[K]), .h_ej(h_ej[K]));
    end
  end

  // Ready of each ring output: from whichever router has selected it.
  always_comb begin
    for (int k = 0; k < NT; k++) begin
      automatic int r = k / COLS;
      automatic int c = k % COLS;
      vo_ready[k] = (r < ROWS - 1) ? n_ready[k + COLS] : 1'b0;
      for (int rr = 0; rr < ROWS; rr++) begin
        if (int'(cfg[rr*COLS + c].relink_row) == r) vo_ready[k] |= rl_ready[rr*COLS + c];
      end
      if (r == ROWS - 1) begin
        for (int j = 0; j < NT; j++) begin
          if (int'(cfg[j].dlink_col) == c) vo_ready[k] |= dl_ready[j];
        end
      end
    end
  end
endmodule
