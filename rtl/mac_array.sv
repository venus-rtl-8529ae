// MAC array of one processing element.
//
// LANES multiply-accumulate units work in parallel (the document gives 16 per
// PE). All lanes take the same activation and each lane its own weight, so one
// step adds act*w[l] into accumulator l; with weights held per output channel
// the lanes compute LANES output channels at once (this lane organisation is
// this design's choice). Operands are signed DATA_W, accumulators signed ACC_W
// and wrap on overflow.
//
// Timing: when `en` is high the product is added on the next clock edge.
// `clr` together with `en` starts a new sum with the current product; `clr`
// alone zeroes the accumulators. Results are registered outputs.
module mac_array
  import venus_pkg::*;
#(
  parameter int unsigned LANES = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                en,
  input  logic                                clr,
  input  logic signed [DATA_W-1:0]            act,
  input  logic        [LANES-1:0][DATA_W-1:0] wts,
  output logic        [LANES-1:0][ACC_W-1:0]  acc
);
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic signed [2*DATA_W-1:0] prod;
    assign prod = act * $signed(wts[l]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          acc[l] <= '0;
      else if (en && clr)  acc[l] <= ACC_W'(prod);
      else if (en)         acc[l] <= acc[l] + ACC_W'(prod);
      else if (clr)        acc[l] <= '0;
    end
  end
endmodule
