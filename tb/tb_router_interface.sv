// Testbench for router_interface: receive-side merge with vertical
// priority and ready routing, send-side steering by direction with the
// tile id stamped, all over random stimulus.
`include "tb_check.svh"
module tb_router_interface;
  import venus_pkg::*;
  localparam logic [ID_W-1:0] MYID = 10'd77;
  logic v_ej_valid, v_ej_ready, h_ej_valid, h_ej_ready, rx_valid, rx_ready;
  flit_t v_ej, h_ej, v_inj, h_inj;
  logic [DATA_W-1:0] rx_data;
  logic tx_valid, tx_ready, tx_dir, v_inj_valid, v_inj_ready, h_inj_valid, h_inj_ready;
  logic [ACC_W-1:0] tx_data;
  int checks = 0, failures = 0;
  logic [ID_W-1:0] my_id = MYID;
  router_interface dut (.*);
  initial begin
    for (int t = 0; t < 500; t++) begin
      {v_ej_valid, h_ej_valid, rx_ready, tx_valid, tx_dir, v_inj_ready, h_inj_ready} = 7'($urandom);
      v_ej = '{src: 10'($urandom), data: $urandom};
      h_ej = '{src: 10'($urandom), data: $urandom};
      tx_data = $urandom;
      #1;
      `CHECK(rx_valid == (v_ej_valid || h_ej_valid), "rx_valid")
      if (v_ej_valid) `CHECK(rx_data == v_ej.data[15:0], "vertical first")
      else if (h_ej_valid) `CHECK(rx_data == h_ej.data[15:0], "horizontal data")
      `CHECK(v_ej_ready == rx_ready, "v ready")
      `CHECK(h_ej_ready == (rx_ready && !v_ej_valid), "h ready")
      `CHECK(v_inj_valid == (tx_valid && !tx_dir) && h_inj_valid == (tx_valid && tx_dir), "tx steering")
      `CHECK(tx_ready == (tx_dir ? h_inj_ready : v_inj_ready), "tx ready")
      `CHECK(v_inj.src == MYID && v_inj.data == tx_data && h_inj.data == tx_data, "stamp")
    end
    `TB_FINISH
  end
endmodule
