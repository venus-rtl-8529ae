// Instruction dispatcher: the controller and decoder of the control unit.
//
// As in the document, the controller generates instruction-buffer
// addresses, the fetched instruction is decoded, and issue and completion
// are tracked. Execution (this design's choice of semantics):
//   IOP_TILE  wait until every tile is idle, then send the tile command to
//             one tile or to all (tile field = all ones) for one cycle
//   IOP_DMA   wait until DRAM channel `top` is free, then hand it the job
//   IOP_CFG   start dataflow selection for the oldest host request and wait
//             until the router configuration has been written (`cfg_done`)
//   IOP_WAIT  wait until every tile and every DRAM channel is idle
//   IOP_END   stop; `done` stays high until the next `start`
// Each instruction takes at least three cycles (fetch, decode, issue).
// `issued` counts instructions issued since `start`.
module instruction_dispatcher
  import venus_pkg::*;
#(
  parameter int unsigned NT       = 1024,
  parameter int unsigned NCH      = 4,
  parameter int unsigned IB_DEPTH = 256,
  localparam int unsigned IBW = (IB_DEPTH > 1) ? $clog2(IB_DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [15:0]        issued,
  // instruction buffer
  output logic               ib_rd_en,
  output logic [IBW-1:0]     ib_rd_addr,
  input  instr_t             ib_rd_data,
  // tiles
  input  logic [NT-1:0]      tile_busy,
  output logic [NT-1:0]      tile_cmd_valid,
  output tile_cmd_t          tile_cmd,
  // DRAM channels
  input  logic [NCH-1:0]     dma_busy,
  output logic [NCH-1:0]     dma_valid,
  output logic [23:0]        dma_dram_addr,
  output logic [ID_W-1:0]    dma_tile,
  output logic [ADDR_W-1:0]  dma_db_addr,
  output logic [LEN_W-1:0]   dma_len,
  // configuration
  output logic               cfg_start,
  input  logic               cfg_done
);
  typedef enum logic [2:0] {D_IDLE, D_FETCH, D_DECODE, D_EXEC, D_CFGWAIT} dstate_e;
  dstate_e  st;
  logic [IBW-1:0] pc;
  instr_t   ir;

  assign busy       = (st != D_IDLE);
  assign ib_rd_en   = (st == D_FETCH);
  assign ib_rd_addr = pc;

  localparam int unsigned CHW = (NCH > 1) ? $clog2(NCH) : 1;
  logic [CHW-1:0] ch;
  assign ch = CHW'(ir.top);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= D_IDLE;
      pc             <= '0;
      ir             <= '0;
      done           <= 1'b0;
      issued         <= '0;
      tile_cmd_valid <= '0;
      tile_cmd       <= '0;
      dma_valid      <= '0;
      dma_dram_addr  <= '0;
      dma_tile       <= '0;
      dma_db_addr    <= '0;
      dma_len        <= '0;
      cfg_start      <= 1'b0;
    end else begin
      tile_cmd_valid <= '0;
      dma_valid      <= '0;
      cfg_start      <= 1'b0;
      unique case (st)
        D_IDLE: if (start) begin
          st     <= D_FETCH;
          pc     <= '0;
          done   <= 1'b0;
          issued <= '0;
        end
        D_FETCH:  st <= D_DECODE;
        D_DECODE: begin
          ir <= ib_rd_data;
          st <= D_EXEC;
        end
        D_EXEC: begin
          unique case (ir.op)
            IOP_END: begin
              st   <= D_IDLE;
              done <= 1'b1;
            end
            IOP_TILE: if (tile_busy == '0 && tile_cmd_valid == '0) begin
              tile_cmd <= '{op: ir.top, addr: ir.addr, len: ir.len};
              for (int t = 0; t < NT; t++)
                tile_cmd_valid[t] <= (ir.tile == BCAST) || (ir.tile == ID_W'(t));
              issued <= issued + 1'b1;
              pc     <= pc + 1'b1;
              st     <= D_FETCH;
            end
            IOP_DMA: if (!dma_busy[ch] && !dma_valid[ch]) begin
              dma_valid[ch] <= 1'b1;
              dma_dram_addr <= ir.ext;
              dma_tile      <= ir.tile;
              dma_db_addr   <= ir.addr;
              dma_len       <= ir.len;
              issued        <= issued + 1'b1;
              pc            <= pc + 1'b1;
              st            <= D_FETCH;
            end
            IOP_CFG: begin
              cfg_start <= 1'b1;
              issued    <= issued + 1'b1;
              st        <= D_CFGWAIT;
            end
            IOP_WAIT: if (tile_busy == '0 && dma_busy == '0 && tile_cmd_valid == '0 && dma_valid == '0) begin
              issued <= issued + 1'b1;
              pc     <= pc + 1'b1;
              st     <= D_FETCH;
            end
            default: begin
              pc <= pc + 1'b1;
              st <= D_FETCH;
            end
          endcase
        end
        D_CFGWAIT: if (cfg_done) begin
          pc <= pc + 1'b1;
          st <= D_FETCH;
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
