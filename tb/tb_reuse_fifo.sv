// Testbench for reuse_fifo (banks of 4): random bursts with pauses and a
// random reader. Checks order and data against a queue, that nothing is
// visible to the reader before its bank is handed over (full or pause),
// and that both the full hand-over and the pause hand-over happen.
`include "tb_check.svh"
module tb_reuse_fifo;
  localparam int W = 16, BANK = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_ready = 0;
  logic in_ready, out_valid;
  logic [W-1:0] in_data = 0, out_data;
  int checks = 0, failures = 0, full_swaps = 0, pause_swaps = 0, wcnt = 0;
  logic [W-1:0] q [$];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  reuse_fifo #(.W(W), .BANK(BANK)) dut (.*);
  // count hand-overs seen on the write side
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      wcnt = wcnt + 1;
      if (wcnt == BANK) begin full_swaps++; wcnt = 0; end
    end else if (!in_valid && wcnt != 0 && in_ready) begin pause_swaps++; wcnt = 0; end
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // a single word alone: must appear only after the pause hands it over
    @(negedge clk); in_valid = 1; in_data = 16'h1234;
    @(negedge clk); in_valid = 0; q.push_back(16'h1234);
    `CHECK(!out_valid, "not visible while bank open")
    @(negedge clk);
    `CHECK(out_valid && out_data == 16'h1234, "visible after pause")
    out_ready = 1; @(negedge clk); out_ready = 0; void'(q.pop_front());
    for (int t = 0; t < 3000; t++) begin
      in_valid = ($urandom % 8) != 0;
      in_data  = W'($urandom);
      out_ready = ($urandom % 3) != 0;
      #1;
      if (out_valid && out_ready) begin
        `CHECK(q.size() > 0 && out_data == q[0], "order / data")
        if (q.size() > 0) void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    repeat (20) @(negedge clk) ;
    `CHECK(full_swaps > 0 && pause_swaps > 0, $sformatf("hand-overs full=%0d pause=%0d", full_swaps, pause_swaps))
    `TB_FINISH
  end
  // drain checker for the tail
  always @(negedge clk) if (rst_n && !in_valid && out_ready && out_valid && $time > 30000) begin
    checks++;
    if (q.size() == 0 || out_data != q[0]) begin failures++; $display("FAIL: tail"); end
    if (q.size() > 0) void'(q.pop_front());
  end
endmodule
