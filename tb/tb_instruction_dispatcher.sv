// Testbench for instruction_dispatcher with a small program in a behavioural
// instruction memory: a DMA on channel 1, a unicast and a broadcast tile
// command, a configuration step, a wait and an end. Tiles and DRAM channels
// are modelled as busy for a few cycles after a command. Checks issue order,
// payloads, that tile commands wait for idle tiles, that CFG waits for
// cfg_done, that WAIT waits for everything, and the issue count.
`include "tb_check.svh"
module tb_instruction_dispatcher;
  import venus_pkg::*;
  localparam int NT = 4, NCH = 2;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] issued;
  logic ib_rd_en; logic [7:0] ib_rd_addr; instr_t ib_rd_data;
  logic [NT-1:0] tile_busy = 0, tile_cmd_valid; tile_cmd_t tile_cmd;
  logic [NCH-1:0] dma_busy = 0, dma_valid; logic [23:0] dma_dram_addr; logic [ID_W-1:0] dma_tile;
  logic [ADDR_W-1:0] dma_db_addr; logic [LEN_W-1:0] dma_len;
  logic cfg_start, cfg_done = 0;
  int checks = 0, failures = 0;
  instr_t prog [8];
  int tbusy [NT], dbusy [NCH], cfg_t = -1, now = 0;
  string log_s [$];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 3000)
  instruction_dispatcher #(.NT(NT), .NCH(NCH), .IB_DEPTH(256)) dut (.*);
  always @(posedge clk) if (ib_rd_en) ib_rd_data <= prog[ib_rd_addr];
  always @(posedge clk) if (rst_n) begin
    now++;
    for (int t = 0; t < NT; t++) begin
      if (tbusy[t] > 0) tbusy[t]--;
      if (tile_cmd_valid[t]) begin
        if (tile_busy[t]) begin failures++; $display("FAIL: command to busy tile"); end
        if (tile_cmd.op == TOP_WB && (dbusy[0] > 0 || dbusy[1] > 0)) begin failures++; $display("FAIL: command after WAIT while DRAM busy"); end
        tbusy[t] = 10; log_s.push_back($sformatf("T%0d:%0d:%0d", t, tile_cmd.op, tile_cmd.addr));
      end
    end
    for (int c = 0; c < NCH; c++) begin
      if (dbusy[c] > 0) dbusy[c]--;
      if (dma_valid[c]) begin dbusy[c] = 60; log_s.push_back($sformatf("D%0d:%0d:%0d:%0d", c, dma_dram_addr, dma_tile, dma_len)); end
    end
    if (cfg_start) begin cfg_t = 8; log_s.push_back("C"); end
    cfg_done <= (cfg_t == 1);
    if (cfg_t > 0) cfg_t--;
    for (int t = 0; t < NT; t++) tile_busy[t] <= tbusy[t] > 0;
    for (int c = 0; c < NCH; c++) dma_busy[c] <= dbusy[c] > 0;
  end
  initial begin
    foreach (tbusy[t]) tbusy[t] = 0;
    foreach (dbusy[c]) dbusy[c] = 0;
    prog[0] = '{op: IOP_DMA,  top: tile_op_e'(1), tile: 10'd2, addr: 16'd0, len: 16'd20, ext: 24'd500};
    prog[1] = '{op: IOP_TILE, top: TOP_LDWT, tile: 10'd1, addr: 16'd7, len: 16'd3, ext: 24'd0};
    prog[2] = '{op: IOP_TILE, top: TOP_COMP, tile: BCAST, addr: 16'd9, len: 16'd3, ext: 24'd0};
    prog[3] = '{op: IOP_CFG,  top: TOP_NOP,  tile: 10'd0, addr: 16'd0, len: 16'd0, ext: 24'd0};
    prog[4] = '{op: IOP_WAIT, top: TOP_NOP,  tile: 10'd0, addr: 16'd0, len: 16'd0, ext: 24'd0};
    prog[5] = '{op: IOP_TILE, top: TOP_WB,   tile: 10'd3, addr: 16'd11, len: 16'd0, ext: 24'd0};
    prog[6] = '{op: IOP_END,  top: TOP_NOP,  tile: 10'd0, addr: 16'd0, len: 16'd0, ext: 24'd0};
    prog[7] = prog[6];
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    `CHECK(issued == 6, $sformatf("issued %0d", issued))
    `CHECK(log_s.size() == 8, $sformatf("%0d events", log_s.size()))
    if (log_s.size() == 8) begin
      `CHECK(log_s[0] == "D1:500:2:20", log_s[0])
      `CHECK(log_s[1] == "T1:1:7", log_s[1])
      `CHECK(log_s[2] == "T0:2:9" && log_s[3] == "T1:2:9" && log_s[4] == "T2:2:9" && log_s[5] == "T3:2:9", "broadcast")
      `CHECK(log_s[6] == "C", "cfg")
      `CHECK(log_s[7] == "T3:3:11", log_s[7])
    end
    `CHECK(tile_busy[2:0] == 0 && dma_busy == 0, "WAIT let every earlier command finish")
    `TB_FINISH
  end
endmodule
