// Testbench for crossbar (4 inputs, 4 rows of 4 tiles): random traffic;
// every accepted word must appear on the output of its row with its column,
// address and data in the same cycle, one word per output per cycle, no
// word may be lost, and contending inputs must all be served (round-robin).
`include "tb_check.svh"
module tb_crossbar;
  import venus_pkg::*;
  localparam int NIN = 4, NOUT = 4, COLS = 4;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0] in_valid = 0, in_ready;
  logic [NIN-1:0][ID_W-1:0] in_tile; logic [NIN-1:0][ADDR_W-1:0] in_addr; logic [NIN-1:0][DATA_W-1:0] in_data;
  logic [NOUT-1:0] out_valid; logic [NOUT-1:0][RC_W-1:0] out_col; logic [NOUT-1:0][ADDR_W-1:0] out_addr; logic [NOUT-1:0][DATA_W-1:0] out_data;
  int checks = 0, failures = 0, served [NIN];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  crossbar #(.NIN(NIN), .NOUT(NOUT), .COLS(COLS)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (served[i]) served[i] = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      for (int i = 0; i < NIN; i++) begin
        in_valid[i] = ($urandom % 4) != 0;
        in_tile[i]  = (t < 300) ? ID_W'($urandom % 16) : ID_W'(5);   // later: all inputs to tile 5
        in_addr[i]  = ADDR_W'($urandom); in_data[i] = DATA_W'($urandom);
      end
      #1;
      for (int o = 0; o < NOUT; o++) begin
        automatic int n = 0;
        for (int i = 0; i < NIN; i++) if (in_valid[i] && in_ready[i] && int'(in_tile[i]) / COLS == o) begin
          n++;
          `CHECK(out_valid[o] && out_col[o] == RC_W'(int'(in_tile[i]) % COLS) && out_addr[o] == in_addr[i] && out_data[o] == in_data[i], "routed")
          if (t >= 300) served[i]++;
        end
        `CHECK(n == int'(out_valid[o]), "one word per output")
        begin
          automatic bit want = 0;
          for (int i = 0; i < NIN; i++) if (in_valid[i] && int'(in_tile[i]) / COLS == o) want = 1;
          `CHECK(out_valid[o] == want, "no idle output while requested")
        end
      end
    end
    for (int i = 0; i < NIN; i++) `CHECK(served[i] > 40, $sformatf("input %0d served %0d", i, served[i]))
    `TB_FINISH
  end
endmodule
