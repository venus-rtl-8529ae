// Testbench for data_dispatcher: after `start` with a base, a gapped input
// stream must read consecutive local-buffer entries from the base, and the
// MAC enable, clear-on-first and activation must follow one cycle later.
`include "tb_check.svh"
module tb_data_dispatcher;
  import venus_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [7:0] base = 0, lb_rd_addr;
  logic [DATA_W-1:0] in_act = 0, mac_act;
  logic lb_rd_en, mac_en, mac_clr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  data_dispatcher #(.DEPTH(160)) dut (.*);
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      automatic int n = 0, b = 10 + 37 * run;
      @(negedge clk); start = 1; base = 8'(b);
      @(negedge clk); start = 0;
      while (n < 20) begin
        logic v; logic [DATA_W-1:0] a;
        v = ($urandom % 3) != 0; a = DATA_W'($urandom);
        in_valid = v; in_act = a; #1;
        `CHECK(lb_rd_en == v, "rd_en follows in_valid")
        if (v) `CHECK(lb_rd_addr == 8'(b + n), $sformatf("rd addr %0d want %0d", lb_rd_addr, b + n))
        @(negedge clk);
        `CHECK(mac_en == v, "mac_en one cycle later")
        if (v) begin
          `CHECK(mac_act == a, "mac_act")
          `CHECK(mac_clr == (n == 0), "clear on first")
          n++;
        end
      end
      in_valid = 0;
    end
    `TB_FINISH
  end
endmodule
