// Processing element (PE).
//
// As in the document, a PE holds a local buffer, a data dispatcher, a MAC
// array and a processing unit (ReLU). Weights are written into the local
// buffer beforehand and stay there (weight stationary). Activations arrive
// on `act_in`; each one is multiplied with the next local-buffer entry in all
// LANES MAC units, and is passed on, one cycle later, on `act_out` to the
// neighbouring PE of the mesh. Results are read combinationally one lane at a
// time through the processing unit.
//
// Timing: an activation accepted in cycle t is forwarded in cycle t+1 and is
// in the accumulators after cycle t+2.
module pe
  import venus_pkg::*;
#(
  parameter int unsigned LANES    = 16,
  parameter int unsigned LB_DEPTH = 160,
  localparam int unsigned AW = (LB_DEPTH > 1) ? $clog2(LB_DEPTH) : 1,
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // weight load
  input  logic              wt_wr_en,
  input  logic [AW-1:0]     wt_wr_addr,
  input  logic [LW-1:0]     wt_wr_lane,
  input  logic [DATA_W-1:0] wt_wr_data,
  // computation
  input  logic              start,
  input  logic [AW-1:0]     base,
  input  logic              act_in_valid,
  input  logic [DATA_W-1:0] act_in,
  output logic              act_out_valid,
  output logic [DATA_W-1:0] act_out,
  // results
  input  logic [LW-1:0]     res_lane,
  input  logic              relu_en,
  output logic [ACC_W-1:0]  res_data
);
  logic                         lb_rd_en, mac_en, mac_clr;
  logic [AW-1:0]                lb_rd_addr;
  logic [LANES-1:0][DATA_W-1:0] lb_rd_data;
  logic [DATA_W-1:0]            mac_act;
  logic [LANES-1:0][ACC_W-1:0]  acc;

  local_buffer #(.LANES(LANES), .DEPTH(LB_DEPTH)) u_lb (
    .clk, .wr_en(wt_wr_en), .wr_addr(wt_wr_addr), .wr_lane(wt_wr_lane), .wr_data(wt_wr_data),
    .rd_en(lb_rd_en), .rd_addr(lb_rd_addr), .rd_data(lb_rd_data));

  data_dispatcher #(.DEPTH(LB_DEPTH)) u_disp (
    .clk, .rst_n, .start, .base, .in_valid(act_in_valid), .in_act(act_in),
    .lb_rd_en, .lb_rd_addr, .mac_en, .mac_clr, .mac_act);

  mac_array #(.LANES(LANES)) u_mac (
    .clk, .rst_n, .en(mac_en), .clr(mac_clr), .act(mac_act), .wts(lb_rd_data), .acc);

  processing_unit u_pu (.relu_en, .din(acc[res_lane]), .dout(res_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_out_valid <= 1'b0;
      act_out       <= '0;
    end else begin
      act_out_valid <= act_in_valid;
      if (act_in_valid) act_out <= act_in;
    end
  end
endmodule
