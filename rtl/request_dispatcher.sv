// Request dispatcher: the queue of layer requests posted by the host.
//
// The document has the control unit store the host's requests here and
// hand each compiled request to the dataflow selection unit. A request is a
// layer (full and sub-layer sizes). DEPTH requests are kept in arrival
// order; `out_valid`/`out_ready` hand the oldest one on. Queue depth is this
// design's choice. A request pushed while the queue is full is refused and
// counted in `dropped`.
module request_dispatcher
  import venus_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  layer_req_t in_req,
  output logic       out_valid,
  input  logic       out_ready,
  output layer_req_t out_req,
  output logic [7:0] pending,
  output logic [7:0] dropped
);
  logic in_ready;

  flit_fifo #(.T(layer_req_t), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_req),
    .out_valid, .out_ready, .out_data(out_req));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      dropped <= '0;
    end else begin
      pending <= pending + 8'(in_valid && in_ready) - 8'(out_valid && out_ready);
      if (in_valid && !in_ready) dropped <= dropped + 1'b1;
    end
  end
endmodule
