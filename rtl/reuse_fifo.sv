// Reuse FIFO of a tile: a double buffer between the router interface and the
// distributed buffer.
//
// The document describes this FIFO as a double buffer that lets tiles
// exchange data. It is built here as two ping-pong banks of BANK words. The
// writer fills one bank; the bank is handed to the reader when it is full,
// or when the incoming stream pauses for a cycle with the bank non-empty.
// The reader then drains that bank in order while the writer fills the
// other. Bank size and the hand-over on a pause are this design's choices.
//
// Interface: valid/ready on both sides; `out_data` is the head of the bank
// being drained, visible combinationally.
module reuse_fifo #(
  parameter int unsigned W    = 16,
  parameter int unsigned BANK = 16,
  localparam int unsigned AW = (BANK > 1) ? $clog2(BANK) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);
  logic [W-1:0] mem [2][BANK];
  logic [1:0]   closed;
  logic [AW:0]  cnt [2];
  logic         wb, rb;
  logic [AW:0]  rptr;
  logic         push, pop;

  assign in_ready  = !closed[wb];
  assign push      = in_valid && in_ready;
  assign out_valid = closed[rb];
  assign out_data  = mem[rb][rptr[AW-1:0]];
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      closed <= '0;
      cnt[0] <= '0;
      cnt[1] <= '0;
      wb     <= 1'b0;
      rb     <= 1'b0;
      rptr   <= '0;
    end else begin
      // writer side: only ever touches the open bank wb
      if (push) begin
        cnt[wb] <= cnt[wb] + 1'b1;
        if (cnt[wb] == (AW+1)'(BANK-1)) begin
          closed[wb] <= 1'b1;
          wb         <= !wb;
        end
      end else if (!in_valid && !closed[wb] && cnt[wb] != '0) begin
        closed[wb] <= 1'b1;
        wb         <= !wb;
      end
      // reader side: only ever touches the closed bank rb
      if (pop) begin
        if (rptr + 1'b1 == cnt[rb]) begin
          closed[rb] <= 1'b0;
          cnt[rb]    <= '0;
          rptr       <= '0;
          rb         <= !rb;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wb][cnt[wb][AW-1:0]] <= in_data;
  end
endmodule
