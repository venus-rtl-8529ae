// Data dispatcher of a processing element.
//
// Pairs each activation that arrives on the PE's input stream with the next
// entry of stationary weights in the local buffer and drives the MAC array.
// The document only names this unit; the weight-stationary pairing below is
// this design's reading of it. `start` rewinds the weight pointer to `base`
// and makes the next MAC start a fresh sum. For every `in_valid` the
// dispatcher reads local-buffer entry ptr and, one cycle later when the entry
// is out of the buffer, asserts `mac_en` with the delayed activation.
module data_dispatcher
  import venus_pkg::*;
#(
  parameter int unsigned DEPTH = 160,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [AW-1:0]     base,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_act,
  output logic              lb_rd_en,
  output logic [AW-1:0]     lb_rd_addr,
  output logic              mac_en,
  output logic              mac_clr,
  output logic [DATA_W-1:0] mac_act
);
  logic [AW-1:0] ptr;
  logic          first;

  assign lb_rd_en   = in_valid;
  assign lb_rd_addr = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr     <= '0;
      first   <= 1'b1;
      mac_en  <= 1'b0;
      mac_clr <= 1'b0;
      mac_act <= '0;
    end else begin
      mac_en  <= in_valid;
      mac_clr <= in_valid && first;
      if (in_valid) mac_act <= in_act;
      if (start) begin
        ptr   <= base;
        first <= 1'b1;
      end else if (in_valid) begin
        ptr   <= ptr + 1'b1;
        first <= 1'b0;
      end
    end
  end
endmodule
