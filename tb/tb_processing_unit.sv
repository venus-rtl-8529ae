// Testbench for processing_unit: ReLU on random and edge-case sums, and the
// bypass with relu_en low.
`include "tb_check.svh"
module tb_processing_unit;
  import venus_pkg::*;
  logic relu_en;
  logic [ACC_W-1:0] din, dout;
  int checks = 0, failures = 0;
  processing_unit dut (.*);
  initial begin
    logic [ACC_W-1:0] v [6] = '{0, 1, 32'h7fffffff, 32'h80000000, 32'hffffffff, 12345};
    for (int i = 0; i < 206; i++) begin
      din = (i < 6) ? v[i] : $urandom;
      relu_en = 1; #1;
      `CHECK(dout == (($signed(din) < 0) ? 0 : din), $sformatf("relu(%0d)=%0d", $signed(din), $signed(dout)))
      relu_en = 0; #1;
      `CHECK(dout == din, "bypass")
    end
    `TB_FINISH
  end
endmodule
