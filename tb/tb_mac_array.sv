// Testbench for mac_array: random activations and weights through all 16
// lanes, compared each cycle with accumulators kept in the testbench;
// includes clear-with-enable, clear alone, and one-cycle result latency.
`include "tb_check.svh"
module tb_mac_array;
  import venus_pkg::*;
  localparam int LANES = 16;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic signed [DATA_W-1:0] act = 0;
  logic [LANES-1:0][DATA_W-1:0] wts = '0;
  logic [LANES-1:0][ACC_W-1:0] acc;
  int checks = 0, failures = 0;
  longint model [LANES];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  mac_array #(.LANES(LANES)) dut (.*);
  initial begin
    foreach (model[l]) model[l] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 23) == 0;
      act = DATA_W'($urandom);
      foreach (wts[l]) wts[l] = DATA_W'($urandom);
      for (int l = 0; l < LANES; l++) begin
        automatic longint p = longint'(act) * longint'($signed(wts[l]));
        if (en && clr) model[l] = p;
        else if (en)   model[l] = model[l] + p;
        else if (clr)  model[l] = 0;
      end
      @(posedge clk); #1;
      for (int l = 0; l < LANES; l++)
        `CHECK(acc[l] == ACC_W'(model[l]), $sformatf("t=%0d lane %0d got %0d want %0d", t, l, $signed(acc[l]), int'(model[l])))
    end
    `TB_FINISH
  end
endmodule
