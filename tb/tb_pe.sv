// Testbench for pe: loads LEN entries of random weights, streams LEN random
// activations with gaps, and compares every lane of the result with a
// dot product computed here, with and without ReLU. Also checks that the
// activation stream is forwarded with one cycle of latency.
`include "tb_check.svh"
module tb_pe;
  import venus_pkg::*;
  localparam int LANES = 16, LEN = 24;
  logic clk = 0, rst_n = 0;
  logic wt_wr_en = 0; logic [7:0] wt_wr_addr = 0; logic [3:0] wt_wr_lane = 0; logic [DATA_W-1:0] wt_wr_data = 0;
  logic start = 0; logic [7:0] base = 0;
  logic act_in_valid = 0; logic [DATA_W-1:0] act_in = 0;
  logic act_out_valid; logic [DATA_W-1:0] act_out;
  logic [3:0] res_lane = 0; logic relu_en = 0; logic [ACC_W-1:0] res_data;
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] w [LEN][LANES];
  logic signed [DATA_W-1:0] a [LEN];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 50000)
  pe #(.LANES(LANES), .LB_DEPTH(160)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      for (int e = 0; e < LEN; e++) for (int l = 0; l < LANES; l++) begin
        w[e][l] = DATA_W'($urandom % 512) - 16'sd256;
        @(negedge clk); wt_wr_en = 1; wt_wr_addr = 8'(e + 5); wt_wr_lane = 4'(l); wt_wr_data = w[e][l];
      end
      @(negedge clk); wt_wr_en = 0; start = 1; base = 8'd5;
      @(negedge clk); start = 0;
      for (int e = 0; e < LEN; ) begin
        automatic logic v = ($urandom % 4) != 0;
        a[e] = DATA_W'($urandom % 512) - 16'sd256;
        act_in_valid = v; act_in = a[e];
        @(negedge clk);
        `CHECK(act_out_valid == v, "forward valid")
        if (v) begin `CHECK(act_out == a[e], "forward data") e++; end
      end
      act_in_valid = 0;
      repeat (3) @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        automatic int s = 0;
        for (int e = 0; e < LEN; e++) s += int'(w[e][l]) * int'(a[e]);
        res_lane = 4'(l); relu_en = 0; #1;
        `CHECK(res_data == ACC_W'(s), $sformatf("lane %0d got %0d want %0d", l, $signed(res_data), s))
        relu_en = 1; #1;
        `CHECK(res_data == ((s < 0) ? 0 : ACC_W'(s)), "relu")
      end
    end
    `TB_FINISH
  end
endmodule
