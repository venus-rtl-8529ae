// Flexible router: a vertical and a horizontal switch joined by
// reconfigurable links.
//
// Following the router figure, the vertical switch handles column-wise ring
// traffic and the horizontal switch row-wise traffic. The router's ring
// input is chosen by the configuration: the mesh link from the router above,
// a reconfigurable bypass link (Re-link) from another router of the same
// column, or a diagonal link (D-link) from the bottom router of another
// column. The Re-link inside the router can also feed the vertical switch's
// output into the horizontal switch instead of the west neighbour
// (`h_from_v`). The document describes the Re-link as pass transistors; here
// it is a multiplexer, which is the digital equivalent. The choice of which
// router drives each link is made in the NoC array around this module.
//
// Ready back to the unselected ring sources is low. `v_out` is the ring
// output towards whichever router selects it; its ready is supplied by the
// array.
module flexible_router
  import venus_pkg::*;
#(
  parameter int unsigned QDEPTH = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ID_W-1:0] my_id,
  input  router_cfg_t     cfg,
  // ring inputs
  input  logic            n_in_valid,
  output logic            n_in_ready,
  input  flit_t           n_in,
  input  logic            relink_in_valid,
  output logic            relink_in_ready,
  input  flit_t           relink_in,
  input  logic            dlink_in_valid,
  output logic            dlink_in_ready,
  input  flit_t           dlink_in,
  // ring output
  output logic            v_out_valid,
  input  logic            v_out_ready,
  output flit_t           v_out,
  // row path
  input  logic            w_in_valid,
  output logic            w_in_ready,
  input  flit_t           w_in,
  output logic            e_out_valid,
  input  logic            e_out_ready,
  output flit_t           e_out,
  // tile side
  input  logic            v_inj_valid,
  output logic            v_inj_ready,
  input  flit_t           v_inj,
  output logic            v_ej_valid,
  input  logic            v_ej_ready,
  output flit_t           v_ej,
  input  logic            h_inj_valid,
  output logic            h_inj_ready,
  input  flit_t           h_inj,
  output logic            h_ej_valid,
  input  logic            h_ej_ready,
  output flit_t           h_ej
);
  logic  vin_valid, vin_ready, vo_valid, vo_ready, hw_valid, hw_ready;
  flit_t vin, vo, hw;

  // ring input select (Re-link / D-link muxes)
  always_comb begin
    vin_valid       = 1'b0;
    vin             = n_in;
    n_in_ready      = 1'b0;
    relink_in_ready = 1'b0;
    dlink_in_ready  = 1'b0;
    unique case (cfg.v_src)
      VSRC_NORTH:  begin vin_valid = n_in_valid;      vin = n_in;      n_in_ready      = vin_ready; end
      VSRC_RELINK: begin vin_valid = relink_in_valid; vin = relink_in; relink_in_ready = vin_ready; end
      VSRC_DLINK:  begin vin_valid = dlink_in_valid;  vin = dlink_in;  dlink_in_ready  = vin_ready; end
      default: ;
    endcase
  end

  vertical_switch #(.QDEPTH(QDEPTH)) u_vsw (
    .clk, .rst_n, .en(cfg.v_src != VSRC_OFF), .my_id,
    .ring_in_valid(vin_valid), .ring_in_ready(vin_ready), .ring_in(vin),
    .tile_in_valid(v_inj_valid), .tile_in_ready(v_inj_ready), .tile_in(v_inj),
    .ring_out_valid(vo_valid), .ring_out_ready(vo_ready), .ring_out(vo),
    .tile_out_valid(v_ej_valid), .tile_out_ready(v_ej_ready), .tile_out(v_ej));

  // Re-link between the two switches of this router
  always_comb begin
    v_out       = vo;
    v_out_valid = vo_valid && !cfg.h_from_v;
    vo_ready    = cfg.h_from_v ? hw_ready : v_out_ready;
    hw_valid    = cfg.h_from_v ? vo_valid : w_in_valid;
    hw          = cfg.h_from_v ? vo : w_in;
    w_in_ready  = !cfg.h_from_v && hw_ready;
  end

  horizontal_switch #(.QDEPTH(QDEPTH)) u_hsw (
    .clk, .rst_n, .mode(cfg.h_mode), .my_id,
    .w_in_valid(hw_valid), .w_in_ready(hw_ready), .w_in(hw),
    .tile_in_valid(h_inj_valid), .tile_in_ready(h_inj_ready), .tile_in(h_inj),
    .e_out_valid, .e_out_ready, .e_out,
    .tile_out_valid(h_ej_valid), .tile_out_ready(h_ej_ready), .tile_out(h_ej));
endmodule
