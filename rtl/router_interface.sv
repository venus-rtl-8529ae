// Router interface of a tile.
//
// Connects the tile to the two switches of its router, as the muxes of the
// tile figure show. Receive side: flits ejected by the vertical switch (ring
// traffic) and by the horizontal switch (end of a partial-sum chain) are
// merged into one stream towards the reuse FIFO; the vertical switch has
// priority and the payload is cut to the buffer word width. Send side: the
// word stream from the tile controller goes to the vertical or the
// horizontal switch according to `tx_dir` (0 = vertical ring, 1 =
// horizontal chain), stamped with the tile id. Priority, truncation and the
// id stamp are this design's choices. Purely combinational.
module router_interface
  import venus_pkg::*;
(
  input  logic [ID_W-1:0]   my_id,    // this tile's number, stamped on sent flits
  // from the router
  input  logic              v_ej_valid,
  output logic              v_ej_ready,
  input  flit_t             v_ej,
  input  logic              h_ej_valid,
  output logic              h_ej_ready,
  input  flit_t             h_ej,
  // towards the reuse FIFO
  output logic              rx_valid,
  input  logic              rx_ready,
  output logic [DATA_W-1:0] rx_data,
  // from the tile controller
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic              tx_dir,
  input  logic [ACC_W-1:0]  tx_data,
  // to the router
  output logic              v_inj_valid,
  input  logic              v_inj_ready,
  output flit_t             v_inj,
  output logic              h_inj_valid,
  input  logic              h_inj_ready,
  output flit_t             h_inj
);
  always_comb begin
    rx_valid   = v_ej_valid || h_ej_valid;
    rx_data    = v_ej_valid ? v_ej.data[DATA_W-1:0] : h_ej.data[DATA_W-1:0];
    v_ej_ready = rx_ready;
    h_ej_ready = rx_ready && !v_ej_valid;

    v_inj       = '{src: my_id, data: tx_data};
    h_inj       = v_inj;
    v_inj_valid = tx_valid && !tx_dir;
    h_inj_valid = tx_valid &&  tx_dir;
    tx_ready    = tx_dir ? h_inj_ready : v_inj_ready;
  end
endmodule
