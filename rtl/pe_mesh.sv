// Mesh of PR x PC processing elements inside a tile (4 x 4 in the document).
//
// Each mesh row receives its own activation stream at its west PE; every PE
// passes the stream on to its east neighbour one cycle later, so all PEs of a
// row see the same activations and apply their own weights (different output
// channels). Weights are written over a shared bus that addresses one PE at a
// time, and results are read through a PE/lane select; in this design the
// vertical mesh links carry nothing, since the document does not say what
// flows between PE rows.
//
// Timing: an activation entering row r in cycle t reaches PE (r,c) in cycle
// t+c and is accumulated there after cycle t+c+2; the mesh is drained PC+2
// cycles after the last activation.
module pe_mesh
  import venus_pkg::*;
#(
  parameter int unsigned PR       = 4,
  parameter int unsigned PC       = 4,
  parameter int unsigned LANES    = 16,
  parameter int unsigned LB_DEPTH = 160,
  localparam int unsigned NPE = PR * PC,
  localparam int unsigned PW  = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned AW  = (LB_DEPTH > 1) ? $clog2(LB_DEPTH) : 1,
  localparam int unsigned LW  = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wt_wr_en,
  input  logic [PW-1:0]             wt_wr_pe,
  input  logic [AW-1:0]             wt_wr_addr,
  input  logic [LW-1:0]             wt_wr_lane,
  input  logic [DATA_W-1:0]         wt_wr_data,
  input  logic                      start,
  input  logic [AW-1:0]             base,
  input  logic [PR-1:0]             row_valid,
  input  logic [PR-1:0][DATA_W-1:0] row_act,
  input  logic [PW-1:0]             res_pe,
  input  logic [LW-1:0]             res_lane,
  input  logic                      relu_en,
  output logic [ACC_W-1:0]          res_data
);
  logic [PR-1:0][PC:0]             v;
  logic [PR-1:0][PC:0][DATA_W-1:0] a;
  logic [NPE-1:0][ACC_W-1:0]       res;

  for (genvar r = 0; r < PR; r++) begin : g_row
    assign v[r][0] = row_valid[r];
    assign a[r][0] = row_act[r];
    for (genvar c = 0; c < PC; c++) begin : g_col
      localparam int unsigned IDX = r * PC + c;
      pe #(.LANES(LANES), .LB_DEPTH(LB_DEPTH)) u_pe (
        .clk, .rst_n,
        .wt_wr_en(wt_wr_en && (wt_wr_pe == PW'(IDX))),
        .wt_wr_addr, .wt_wr_lane, .wt_wr_data,
        .start, .base,
        .act_in_valid(v[r][c]), .act_in(a[r][c]),
        .act_out_valid(v[r][c+1]), .act_out(a[r][c+1]),
        .res_lane, .relu_en, .res_data(res[IDX]));
    end
  end

  assign res_data = res[res_pe];
endmodule
