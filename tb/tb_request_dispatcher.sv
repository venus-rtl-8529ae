// Testbench for request_dispatcher: requests come out in arrival order,
// the pending count follows, a push into a full queue is refused and
// counted.
`include "tb_check.svh"
module tb_request_dispatcher;
  import venus_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, out_ready = 0;
  layer_req_t in_req = '0, out_req;
  logic [7:0] pending, dropped;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000)
  request_dispatcher #(.DEPTH(4)) dut (.*);
  function automatic layer_req_t mk(int i);
    layer_req_t r;
    for (int d = 0; d < 7; d++) begin r.full[d] = DIM_W'(i * 10 + d); r.sub[d] = DIM_W'(i + d); end
    return r;
  endfunction
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5; i++) begin @(negedge clk); in_valid = 1; in_req = mk(i); end
    @(negedge clk); in_valid = 0;
    `CHECK(pending == 4 && dropped == 1, $sformatf("pending %0d dropped %0d", pending, dropped))
    for (int i = 0; i < 4; i++) begin
      `CHECK(out_valid && out_req == mk(i), $sformatf("order %0d", i))
      out_ready = 1; @(negedge clk); out_ready = 0;
    end
    `CHECK(!out_valid && pending == 0, "empty")
    `TB_FINISH
  end
endmodule
