// Testbench for distributed_buffer at its default 51200 words: writes a
// pattern over the whole address range, reads a random sample and both
// ends back, and checks read-during-write returns the old word.
`include "tb_check.svh"
module tb_distributed_buffer;
  import venus_pkg::*;
  localparam int DEPTH = 51200;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_addr = 0, rd_addr = 0;
  logic [DATA_W-1:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 200000)
  distributed_buffer #(.DEPTH(DEPTH)) dut (.*);
  function automatic logic [DATA_W-1:0] pat(int a); return DATA_W'(a * 40503 + 17); endfunction
  initial begin
    for (int i = 0; i < DEPTH; i++) begin @(negedge clk); wr_en = 1; wr_addr = 16'(i); wr_data = pat(i); end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 500; k++) begin
      automatic int i = (k == 0) ? 0 : (k == 1) ? DEPTH - 1 : int'($urandom % DEPTH);
      @(negedge clk); rd_en = 1; rd_addr = 16'(i);
      @(negedge clk); rd_en = 0;
      `CHECK(rd_data == pat(i), $sformatf("addr %0d", i))
    end
    @(negedge clk); rd_en = 1; rd_addr = 16'd77; wr_en = 1; wr_addr = 16'd77; wr_data = 16'hBEEF;
    @(negedge clk); rd_en = 0; wr_en = 0;
    `CHECK(rd_data == pat(77), "old word on read-during-write")
    @(negedge clk); rd_en = 1;
    @(negedge clk); rd_en = 0;
    `CHECK(rd_data == 16'hBEEF, "new word after write")
    `TB_FINISH
  end
endmodule
