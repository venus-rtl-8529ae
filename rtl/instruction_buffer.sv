// Instruction buffer: holds the program of instructions (instr_t) that the
// instruction dispatcher steps through. The host writes it one instruction
// at a time; the controller reads it with a one-cycle latency, the
// controller supplying the address as the document describes. DEPTH is
// this design's choice.
module instruction_buffer
  import venus_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  instr_t        wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output instr_t        rd_data
);
  instr_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
