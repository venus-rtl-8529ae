// Testbench for local_buffer (default 160 entries x 16 lanes): fills every
// lane word with a known pattern one word at a time, reads every entry
// back, checks one-cycle read latency and that the output holds without
// rd_en.
`include "tb_check.svh"
module tb_local_buffer;
  import venus_pkg::*;
  localparam int LANES = 16, DEPTH = 160;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  logic [3:0] wr_lane = 0;
  logic [DATA_W-1:0] wr_data = 0;
  logic [LANES-1:0][DATA_W-1:0] rd_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  local_buffer #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);
  function automatic logic [DATA_W-1:0] pat(int e, int l); return DATA_W'(e * 131 + l * 7 + 3); endfunction
  initial begin
    for (int e = 0; e < DEPTH; e++)
      for (int l = 0; l < LANES; l++) begin
        @(negedge clk); wr_en = 1; wr_addr = 8'(e); wr_lane = 4'(l); wr_data = pat(e, l);
      end
    @(negedge clk); wr_en = 0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      @(negedge clk); rd_en = 1; rd_addr = 8'(e);
      @(negedge clk); rd_en = 0;
      for (int l = 0; l < LANES; l++) `CHECK(rd_data[l] == pat(e, l), $sformatf("entry %0d lane %0d", e, l))
      @(negedge clk);
      `CHECK(rd_data[0] == pat(e, 0), "hold")
    end
    `TB_FINISH
  end
endmodule
