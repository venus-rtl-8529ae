// Testbench for host_interface: register writes for a layer request, a
// candidate, the candidate count, two instructions and start must produce
// the right one-cycle pulses and payloads; status reads must return the
// status inputs.
`include "tb_check.svh"
module tb_host_interface;
  import venus_pkg::*;
  logic clk = 0, rst_n = 0, host_we = 0;
  logic [7:0] host_addr = 0; logic [31:0] host_wdata = 0, host_rdata;
  logic prog_busy = 0, prog_done = 1, sel_found = 1; logic [4:0] sel_idx = 5'd9; logic [63:0] sel_da = 64'h1234_5678_9abc_def0;
  logic [7:0] req_pending = 8'd3;
  logic start, req_push, cand_we, ib_we; layer_req_t req; logic [4:0] cand_idx; dims_t cand_p; logic [5:0] ncand;
  logic [7:0] ib_addr; instr_t ib_data;
  int checks = 0, failures = 0, n_start = 0, n_push = 0, n_cand = 0, n_ib = 0;
  instr_t ib_seen [2];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000)
  host_interface #(.MAX_CAND(19), .IB_DEPTH(256)) dut (.*);
  always @(posedge clk) if (rst_n) begin
    n_start += start; n_push += req_push; n_cand += cand_we;
    if (ib_we) begin if (ib_addr >= 8'd10 && ib_addr <= 8'd11) ib_seen[ib_addr - 8'd10] = ib_data; n_ib++; end
  end
  task automatic wr(int a, int d); @(negedge clk); host_we = 1; host_addr = 8'(a); host_wdata = 32'(d); @(negedge clk); host_we = 0; endtask
  initial begin
    instr_t i0, i1;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int d = 0; d < 7; d++) begin wr(8'h10 + d, 100 + d); wr(8'h18 + d, 10 + d); end
    wr(8'h1F, 0); @(negedge clk);
    `CHECK(n_push == 1 && req.full[D_X] == 105 && req.sub[D_N] == 10 && req.full[D_Y] == 106, "layer request")
    wr(8'h20, 7); for (int d = 0; d < 7; d++) wr(8'h21 + d, d + 1); wr(8'h28, 0); wr(8'h29, 12);
    `CHECK(n_cand == 1 && cand_idx == 7 && cand_p[D_N] == 1 && cand_p[D_Y] == 7 && ncand == 12, "candidate")
    i0 = '{op: IOP_TILE, top: TOP_COMP, tile: BCAST, addr: 16'd300, len: 16'd9, ext: 24'hABCDE};
    i1 = '{op: IOP_DMA, top: tile_op_e'(2), tile: 10'd5, addr: 16'd1, len: 16'd64, ext: 24'h123456};
    wr(8'h30, 10);
    wr(8'h31, i0[31:0]); wr(8'h32, i0[63:32]); wr(8'h33, 32'(i0[73:64])); wr(8'h34, 0);
    wr(8'h31, i1[31:0]); wr(8'h32, i1[63:32]); wr(8'h33, 32'(i1[73:64])); wr(8'h34, 0); @(negedge clk);
    `CHECK(n_ib == 2 && ib_seen[0] == i0 && ib_seen[1] == i1, "instructions with auto-increment")
    wr(8'h00, 1); @(negedge clk);
    `CHECK(n_start == 1, "start pulse")
    host_addr = 8'h00; #1; `CHECK(host_rdata == 32'd2, "status")
    host_addr = 8'h01; #1; `CHECK(host_rdata == 32'h109, "selection")
    host_addr = 8'h02; #1; `CHECK(host_rdata == 32'h9abc_def0, "DA low")
    host_addr = 8'h03; #1; `CHECK(host_rdata == 32'h1234_5678, "DA high")
    host_addr = 8'h04; #1; `CHECK(host_rdata == 32'd3, "pending")
    `TB_FINISH
  end
endmodule
