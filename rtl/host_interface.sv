// Host interface: the register port through which a host CPU drives Venus.
//
// The document connects the control unit to the host through a host
// interface and names nothing more; the register map below is this
// design's. Writes (host_we, 8-bit address, 32-bit data):
//   0x00  bit 0: start the instruction program at address 0
//   0x10-0x16  layer sizes N,K,C,S,R,X,Y     0x18-0x1E  sub-layer sizes
//   0x1F  post the staged layer as a request to the request dispatcher
//   0x20  candidate index   0x21-0x27  P_N..P_Y   0x28  write the candidate
//   0x29  number of candidates
//   0x30  instruction address   0x31-0x33  instruction bits [31:0], [63:32],
//         [73:64]   0x34  write the instruction and step the address
// Reads (combinational, host_rdata for host_addr):
//   0x00  {program done, program busy}   0x01  {found, best candidate}
//   0x02/0x03  low/high word of the best DRAM access volume
//   0x04  requests waiting
// Write side effects are single-cycle pulses one cycle after the write.
module host_interface
  import venus_pkg::*;
#(
  parameter int unsigned MAX_CAND = 19,
  parameter int unsigned IB_DEPTH = 256,
  localparam int unsigned CW  = (MAX_CAND > 1) ? $clog2(MAX_CAND) : 1,
  localparam int unsigned IBW = (IB_DEPTH > 1) ? $clog2(IB_DEPTH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           host_we,
  input  logic [7:0]     host_addr,
  input  logic [31:0]    host_wdata,
  output logic [31:0]    host_rdata,
  // status
  input  logic           prog_busy,
  input  logic           prog_done,
  input  logic           sel_found,
  input  logic [CW-1:0]  sel_idx,
  input  logic [63:0]    sel_da,
  input  logic [7:0]     req_pending,
  // commands
  output logic           start,
  output logic           req_push,
  output layer_req_t     req,
  output logic           cand_we,
  output logic [CW-1:0]  cand_idx,
  output dims_t          cand_p,
  output logic [CW:0]    ncand,
  output logic           ib_we,
  output logic [IBW-1:0] ib_addr,
  output instr_t         ib_data
);
  logic [73:0]    ibits;
  logic [IBW-1:0] ib_ptr;

  assign ib_data = instr_t'(ibits);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start    <= 1'b0;
      req_push <= 1'b0;
      req      <= '0;
      cand_we  <= 1'b0;
      cand_idx <= '0;
      cand_p   <= '0;
      ncand    <= '0;
      ib_we    <= 1'b0;
      ib_addr  <= '0;
      ib_ptr   <= '0;
      ibits    <= '0;
    end else begin
      start    <= 1'b0;
      req_push <= 1'b0;
      cand_we  <= 1'b0;
      ib_we    <= 1'b0;
      if (host_we) begin
        unique casez (host_addr)
          8'h00: start <= host_wdata[0];
          8'h10, 8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16:
                 req.full[host_addr[2:0]] <= host_wdata[DIM_W-1:0];
          8'h18, 8'h19, 8'h1A, 8'h1B, 8'h1C, 8'h1D, 8'h1E:
                 req.sub[host_addr[2:0]] <= host_wdata[DIM_W-1:0];
          8'h1F: req_push <= 1'b1;
          8'h20: cand_idx <= host_wdata[CW-1:0];
          8'h21, 8'h22, 8'h23, 8'h24, 8'h25, 8'h26, 8'h27:
                 cand_p[host_addr[2:0] - 3'd1] <= host_wdata[DIM_W-1:0];
          8'h28: cand_we <= 1'b1;
          8'h29: ncand <= host_wdata[CW:0];
          8'h30: ib_ptr <= host_wdata[IBW-1:0];
          8'h31: ibits[31:0]  <= host_wdata;
          8'h32: ibits[63:32] <= host_wdata;
          8'h33: ibits[73:64] <= host_wdata[9:0];
          8'h34: begin
            ib_we   <= 1'b1;
            ib_addr <= ib_ptr;
            ib_ptr  <= ib_ptr + 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (host_addr)
      8'h00:   host_rdata = {30'd0, prog_done, prog_busy};
      8'h01:   host_rdata = {23'd0, sel_found, 8'(sel_idx)};
      8'h02:   host_rdata = sel_da[31:0];
      8'h03:   host_rdata = sel_da[63:32];
      8'h04:   host_rdata = {24'd0, req_pending};
      default: host_rdata = '0;
    endcase
  end
endmodule
