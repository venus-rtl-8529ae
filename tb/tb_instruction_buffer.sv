// Testbench for instruction_buffer: writes every entry with a distinct
// instruction and reads them back in a scrambled order with the one-cycle
// latency.
`include "tb_check.svh"
module tb_instruction_buffer;
  import venus_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_addr = 0, rd_addr = 0;
  instr_t wr_data, rd_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  instruction_buffer #(.DEPTH(DEPTH)) dut (.*);
  function automatic instr_t mk(int i);
    return '{op: iop_e'(i % 5), top: tile_op_e'(i % 8), tile: ID_W'(i * 3), addr: ADDR_W'(i * 77), len: LEN_W'(i), ext: 24'(i * 1001)};
  endfunction
  initial begin
    for (int i = 0; i < DEPTH; i++) begin @(negedge clk); wr_en = 1; wr_addr = 8'(i); wr_data = mk(i); end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < DEPTH; k++) begin
      automatic int i = (k * 37) % DEPTH;
      @(negedge clk); rd_en = 1; rd_addr = 8'(i);
      @(negedge clk); rd_en = 0;
      `CHECK(rd_data == mk(i), $sformatf("entry %0d", i))
    end
    `TB_FINISH
  end
endmodule
