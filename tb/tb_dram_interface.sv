// Testbench for dram_interface against the DRAM model: three jobs of
// different lengths; every word must reach the crossbar side once, in
// order, with the right tile, buffer address and data, under random
// request stalls and crossbar back-pressure; outstanding reads stay within
// the limit and busy drops after the last word.
`include "tb_check.svh"
module tb_dram_interface;
  import venus_pkg::*;
  logic clk = 0, rst_n = 0;
  logic job_valid = 0, job_ready, busy;
  logic [23:0] job_dram_addr = 0; logic [ID_W-1:0] job_tile = 0; logic [ADDR_W-1:0] job_db_addr = 0; logic [LEN_W-1:0] job_len = 0;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  logic [23:0] mem_req_addr; logic [DATA_W-1:0] mem_rsp_data;
  logic out_valid, out_ready = 1; logic [ID_W-1:0] out_tile; logic [ADDR_W-1:0] out_addr; logic [DATA_W-1:0] out_data;
  int checks = 0, failures = 0, got = 0, outst = 0, maxout = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  dram_interface #(.MAX_OUT(8), .DRAM_AW(24)) dut (.*);
  dram_model #(.LAT(12)) mem (.clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp_data(mem_rsp_data));
  always @(negedge clk) out_ready <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n) begin
    outst += int'(mem_req_valid && mem_req_ready) - int'(mem_rsp_valid && mem_rsp_ready);
    if (outst > maxout) maxout = outst;
  end
  initial begin
    int base [3] = '{1000, 77, 4096};
    int len  [3] = '{20, 1, 33};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int j = 0; j < 3; j++) begin
      @(negedge clk); job_valid = 1; job_dram_addr = 24'(base[j]); job_tile = ID_W'(j * 5 + 1); job_db_addr = ADDR_W'(j * 100); job_len = LEN_W'(len[j]);
      `CHECK(job_ready, "idle channel takes a job")
      @(negedge clk); job_valid = 0;
      got = 0;
      while (busy) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          `CHECK(out_tile == ID_W'(j * 5 + 1) && out_addr == ADDR_W'(j * 100 + got) &&
                 out_data == mem.dram_word(24'(base[j] + got)), $sformatf("job %0d word %0d", j, got))
          got++;
        end
        @(negedge clk);
      end
      `CHECK(got == len[j], $sformatf("job %0d delivered %0d of %0d", j, got, len[j]))
    end
    `CHECK(maxout <= 8 && maxout > 1, $sformatf("outstanding %0d", maxout))
    `TB_FINISH
  end
endmodule
