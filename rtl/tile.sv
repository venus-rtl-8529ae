// Tile: a slice of the distributed buffer, a reuse FIFO, a router interface
// and a PR x PC mesh of PEs, run by a small tile controller.
//
// The parts and their arrangement follow the tile figure of the document;
// the controller and its command set are this design's own. Commands
// (tile_cmd_t, accepted while `busy` is low, one cycle per command):
//   LDWT  addr,len  copy PR*PC*len*LANES buffer words into the PE local
//                   buffers: PE p, entry e, lane l <- DB[addr+(p*len+e)*LANES+l]
//   COMP  addr,len  start a new sum in every PE and stream len activations
//                   into every mesh row r: DB[addr + r*len + i], i = 0..len-1
//   WB    addr      write ReLU(acc) of PE p lane l to DB[addr + p*LANES + l]
//                   (low DATA_W bits); WBRAW does the same without ReLU
//   VSEND addr,len  put DB[addr .. addr+len-1] on the vertical ring
//   HSEND addr,len  put DB[addr .. addr+len-1] on the horizontal chain
//   RECV  addr      store ring data arriving from now on at addr, addr+1, ...
// Data arriving from the router always passes the reuse FIFO and is written
// into the buffer when the write port is free. Buffer writes from the DRAM
// crossbar (`dbw_*`, no back-pressure) win over controller writes, which win
// over the reuse FIFO.
//
// Timing: LDWT takes one cycle per word plus one, COMP one cycle per
// activation plus PC+3 cycles to drain the mesh, WB one cycle per lane,
// SEND two cycles per word when the router accepts at once.
module tile
  import venus_pkg::*;
#(
  parameter int unsigned     PR        = 4,
  parameter int unsigned     PC        = 4,
  parameter int unsigned     LANES     = 16,
  parameter int unsigned     LB_DEPTH  = 160,
  parameter int unsigned     DB_DEPTH  = 51200,
  parameter int unsigned     FIFO_BANK = 16,
  localparam int unsigned NPE = PR * PC,
  localparam int unsigned PW  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned LBW = (LB_DEPTH > 1) ? $clog2(LB_DEPTH) : 1,
  localparam int unsigned LW  = (LANES > 1) ? $clog2(LANES) : 1,
  localparam int unsigned DBW = (DB_DEPTH > 1) ? $clog2(DB_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   my_id,
  input  logic              cmd_valid,
  input  tile_cmd_t         cmd,
  output logic              busy,
  output logic [LEN_W-1:0]  rx_count,
  // buffer writes from the DRAM crossbar
  input  logic              dbw_valid,
  input  logic [ADDR_W-1:0] dbw_addr,
  input  logic [DATA_W-1:0] dbw_data,
  // router ports
  output logic              v_inj_valid,
  input  logic              v_inj_ready,
  output flit_t             v_inj,
  input  logic              v_ej_valid,
  output logic              v_ej_ready,
  input  flit_t             v_ej,
  output logic              h_inj_valid,
  input  logic              h_inj_ready,
  output flit_t             h_inj,
  input  logic              h_ej_valid,
  output logic              h_ej_ready,
  input  flit_t             h_ej
);
  typedef enum logic [2:0] {S_IDLE, S_LDWT, S_COMP, S_DRAIN, S_WB, S_SEND_RD, S_SEND_TX} state_e;
  state_e state;

  tile_cmd_t         cur;
  logic [31:0]       cnt;
  logic [PW-1:0]     pe_i;
  logic [LBW-1:0]    ent_i;
  logic [LW-1:0]     lane_i;
  logic [LEN_W-1:0]  step_i;
  logic [$clog2(PR+1)-1:0] row_i;
  logic [ADDR_W-1:0] rx_ptr;
  logic              relu, tx_dir;

  // distributed buffer ports
  logic              db_we, db_re;
  logic [ADDR_W-1:0] db_wa, db_ra;
  logic [DATA_W-1:0] db_wd, db_rd;

  distributed_buffer #(.DEPTH(DB_DEPTH)) u_db (
    .clk, .wr_en(db_we), .wr_addr(DBW'(db_wa)), .wr_data(db_wd),
    .rd_en(db_re), .rd_addr(DBW'(db_ra)), .rd_data(db_rd));

  // PE mesh ports
  logic                      wt_we_d, start;
  logic [PW-1:0]             wt_pe_d;
  logic [LBW-1:0]            wt_ent_d;
  logic [LW-1:0]             wt_lane_d;
  logic                      act_v_d;
  logic [$clog2(PR+1)-1:0]   act_r_d;
  logic [PR-1:0]             row_valid;
  logic [PR-1:0][DATA_W-1:0] row_act;
  logic [ACC_W-1:0]          res_data;

  always_comb begin
    row_valid = '0;
    row_act   = '0;
    for (int r = 0; r < PR; r++) begin
      row_act[r] = db_rd;
      if (act_v_d && act_r_d == ($clog2(PR+1))'(r)) row_valid[r] = 1'b1;
    end
  end

  pe_mesh #(.PR(PR), .PC(PC), .LANES(LANES), .LB_DEPTH(LB_DEPTH)) u_mesh (
    .clk, .rst_n,
    .wt_wr_en(wt_we_d), .wt_wr_pe(wt_pe_d), .wt_wr_addr(wt_ent_d), .wt_wr_lane(wt_lane_d),
    .wt_wr_data(db_rd), .start, .base('0), .row_valid, .row_act,
    .res_pe(pe_i), .res_lane(lane_i), .relu_en(relu), .res_data);

  // receive path: router interface -> reuse FIFO -> buffer
  logic              rx_valid, rx_ready, fo_valid, fo_ready;
  logic [DATA_W-1:0] rx_data, fo_data;
  logic              tx_valid, tx_ready;

  router_interface u_ri (
    .my_id,
    .v_ej_valid, .v_ej_ready, .v_ej, .h_ej_valid, .h_ej_ready, .h_ej,
    .rx_valid, .rx_ready, .rx_data,
    .tx_valid, .tx_ready, .tx_dir, .tx_data(ACC_W'(signed'(db_rd))),
    .v_inj_valid, .v_inj_ready, .v_inj, .h_inj_valid, .h_inj_ready, .h_inj);

  reuse_fifo #(.W(DATA_W), .BANK(FIFO_BANK)) u_fifo (
    .clk, .rst_n, .in_valid(rx_valid), .in_ready(rx_ready), .in_data(rx_data),
    .out_valid(fo_valid), .out_ready(fo_ready), .out_data(fo_data));

  logic wb_we;
  assign wb_we    = (state == S_WB) && !dbw_valid;
  assign fo_ready = !dbw_valid && (state != S_WB);
  assign tx_valid = (state == S_SEND_TX);

  always_comb begin
    db_we = 1'b1;
    db_wa = dbw_addr;
    db_wd = dbw_data;
    if (dbw_valid) begin
      db_we = 1'b1;
    end else if (wb_we) begin
      db_wa = cur.addr + ADDR_W'(pe_i) * ADDR_W'(LANES) + ADDR_W'(lane_i);
      db_wd = res_data[DATA_W-1:0];
    end else if (fo_valid) begin
      db_wa = rx_ptr;
      db_wd = fo_data;
    end else begin
      db_we = 1'b0;
    end
  end

  always_comb begin
    db_re = 1'b0;
    db_ra = cur.addr + ADDR_W'(cnt);
    unique case (state)
      S_LDWT:    db_re = 1'b1;
      S_COMP:    begin db_re = 1'b1; db_ra = cur.addr + ADDR_W'(row_i) * cur.len + step_i; end
      S_SEND_RD: db_re = 1'b1;
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      cnt       <= '0;
      pe_i      <= '0;
      ent_i     <= '0;
      lane_i    <= '0;
      step_i    <= '0;
      row_i     <= '0;
      rx_ptr    <= '0;
      rx_count  <= '0;
      relu      <= 1'b0;
      tx_dir    <= 1'b0;
      start     <= 1'b0;
      wt_we_d   <= 1'b0;
      wt_pe_d   <= '0;
      wt_ent_d  <= '0;
      wt_lane_d <= '0;
      act_v_d   <= 1'b0;
      act_r_d   <= '0;
    end else begin
      start   <= 1'b0;
      wt_we_d <= (state == S_LDWT);
      wt_pe_d <= pe_i;
      wt_ent_d <= ent_i;
      wt_lane_d <= lane_i;
      act_v_d <= (state == S_COMP);
      act_r_d <= row_i;
      if (fo_valid && fo_ready) begin
        rx_ptr   <= rx_ptr + 1'b1;
        rx_count <= rx_count + 1'b1;
      end
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur    <= cmd;
          cnt    <= '0;
          pe_i   <= '0;
          ent_i  <= '0;
          lane_i <= '0;
          step_i <= '0;
          row_i  <= '0;
          unique case (cmd.op)
            TOP_LDWT:  if (cmd.len != '0) state <= S_LDWT;
            TOP_COMP:  if (cmd.len != '0) begin state <= S_COMP; start <= 1'b1; end
            TOP_WB:    begin state <= S_WB; relu <= 1'b1; end
            TOP_WBRAW: begin state <= S_WB; relu <= 1'b0; end
            TOP_VSEND: if (cmd.len != '0) begin state <= S_SEND_RD; tx_dir <= 1'b0; end
            TOP_HSEND: if (cmd.len != '0) begin state <= S_SEND_RD; tx_dir <= 1'b1; end
            TOP_RECV:  begin rx_ptr <= cmd.addr; rx_count <= '0; end
            default: ;
          endcase
        end
        S_LDWT: begin
          cnt <= cnt + 1;
          if (lane_i == LW'(LANES-1)) begin
            lane_i <= '0;
            if (ent_i == LBW'(cur.len - 1)) begin
              ent_i <= '0;
              if (pe_i == PW'(NPE-1)) state <= S_IDLE;
              else pe_i <= pe_i + 1'b1;
            end else ent_i <= ent_i + 1'b1;
          end else lane_i <= lane_i + 1'b1;
        end
        S_COMP: begin
          if (row_i == ($clog2(PR+1))'(PR-1)) begin
            row_i <= '0;
            if (step_i == cur.len - 1'b1) begin
              state <= S_DRAIN;
              cnt   <= '0;
            end else step_i <= step_i + 1'b1;
          end else row_i <= row_i + 1'b1;
        end
        S_DRAIN: begin
          cnt <= cnt + 1;
          if (cnt == 32'(PC + 2)) state <= S_IDLE;
        end
        S_WB: if (!dbw_valid) begin
          if (lane_i == LW'(LANES-1)) begin
            lane_i <= '0;
            if (pe_i == PW'(NPE-1)) state <= S_IDLE;
            else pe_i <= pe_i + 1'b1;
          end else lane_i <= lane_i + 1'b1;
        end
        S_SEND_RD: state <= S_SEND_TX;
        S_SEND_TX: if (tx_ready) begin
          cnt <= cnt + 1;
          state <= (cnt + 1 == 32'(cur.len)) ? S_IDLE : S_SEND_RD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
