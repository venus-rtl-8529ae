// Processing unit of a PE: the activation function applied to finished sums.
//
// The document names ReLU as the example of what a PE's processing unit does.
// This unit clamps negative signed sums to zero when `relu_en` is high and
// passes the sum unchanged otherwise (the bypass is this design's addition,
// used to read raw partial sums that are still to be accumulated across
// tiles). Purely combinational.
module processing_unit
  import venus_pkg::*;
(
  input  logic              relu_en,
  input  logic [ACC_W-1:0]  din,
  output logic [ACC_W-1:0]  dout
);
  always_comb begin
    if (relu_en && din[ACC_W-1]) dout = '0;
    else                         dout = din;
  end
endmodule
