// Testbench for pe_mesh (4 x 4 PEs, 16 lanes): random weights per PE, one
// random activation stream per row, then every PE's lanes are compared with
// dot products worked out here. The results must be complete PC+2 cycles
// after the last activation enters.
`include "tb_check.svh"
module tb_pe_mesh;
  import venus_pkg::*;
  localparam int PR = 4, PC = 4, LANES = 16, LEN = 10, NPE = PR * PC;
  logic clk = 0, rst_n = 0;
  logic wt_wr_en = 0; logic [3:0] wt_wr_pe = 0; logic [7:0] wt_wr_addr = 0; logic [3:0] wt_wr_lane = 0;
  logic [DATA_W-1:0] wt_wr_data = 0;
  logic start = 0; logic [7:0] base = 0;
  logic [PR-1:0] row_valid = 0; logic [PR-1:0][DATA_W-1:0] row_act = '0;
  logic [3:0] res_pe = 0, res_lane = 0; logic relu_en = 0; logic [ACC_W-1:0] res_data;
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] w [NPE][LEN][LANES];
  logic signed [DATA_W-1:0] a [PR][LEN];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  pe_mesh #(.PR(PR), .PC(PC), .LANES(LANES), .LB_DEPTH(160)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int p = 0; p < NPE; p++) for (int e = 0; e < LEN; e++) for (int l = 0; l < LANES; l++) begin
      w[p][e][l] = DATA_W'($urandom % 256) - 16'sd128;
      @(negedge clk); wt_wr_en = 1; wt_wr_pe = 4'(p); wt_wr_addr = 8'(e); wt_wr_lane = 4'(l); wt_wr_data = w[p][e][l];
    end
    @(negedge clk); wt_wr_en = 0; start = 1;
    @(negedge clk); start = 0;
    for (int e = 0; e < LEN; e++) begin
      for (int r = 0; r < PR; r++) begin a[r][e] = DATA_W'($urandom % 256) - 16'sd128; row_act[r] = a[r][e]; end
      row_valid = '1;
      @(negedge clk);
    end
    row_valid = '0;
    repeat (PC + 2) @(negedge clk);
    for (int p = 0; p < NPE; p++) for (int l = 0; l < LANES; l++) begin
      automatic int s = 0;
      for (int e = 0; e < LEN; e++) s += int'(w[p][e][l]) * int'(a[p / PC][e]);
      res_pe = 4'(p); res_lane = 4'(l); #1;
      `CHECK(res_data == ACC_W'(s), $sformatf("pe %0d lane %0d got %0d want %0d", p, l, $signed(res_data), s))
    end
    `TB_FINISH
  end
endmodule
