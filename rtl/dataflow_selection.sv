// Dataflow selection unit: Algorithm 1 of the document in hardware.
//
// For one layer, given its full sizes i and the sub-layer sizes i_1 held in
// a distributed buffer, the unit scores every dataflow candidate (a set of
// parallel factors P_i, written by the host into a table of up to MAX_CAND
// entries) by its DRAM access volume and keeps the smallest:
//   V_wt = prod(i_1*P_i, i in K,C,S,R)    R_wt = prod(q_i, i in K,C,S,R)
//   V_if = prod(i_1*P_i, i in N,C,X,Y)    R_if = prod(q_i, i in N,K,C,S,R,X',Y')
//   V_ps = prod(i_1*P_i, i in N,K,X',Y')  R_ps = prod(q_i, i in N,K,S,R,X',Y') * (2*q_C - 1)
//   DA   = V_wt*R_wt + V_if*R_if + V_ps*R_ps,   q_i = ceil(i / (i_1*P_i))
// with X' = X-S+1, Y' = Y-R+1 (and likewise for the sub-layer), P_X' = P_X,
// P_Y' = P_Y. These are the document's equations 1 and 2 for the
// weight-stationary loop order, with the quotients rounded up (this
// design's choice). The sub-layer must fit the buffer (equation 3:
// datavolume <= CDB words) and a candidate may not need more tiles than
// NUM_TILES; infeasible candidates are skipped. Ties keep the earlier entry.
//
// Timing: `start` latches the layer; one candidate is scored per cycle; `done`
// pulses ncand+1 cycles later with the winner (`found` low if none fits).
module dataflow_selection
  import venus_pkg::*;
#(
  parameter int unsigned MAX_CAND  = 19,
  parameter int unsigned CDB       = 51200,
  parameter int unsigned NUM_TILES = 1024,
  localparam int unsigned CW = (MAX_CAND > 1) ? $clog2(MAX_CAND) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // candidate table
  input  logic          cand_we,
  input  logic [CW-1:0] cand_idx,
  input  dims_t         cand_p,
  input  logic [CW:0]   ncand,
  // request
  input  logic          start,
  input  layer_req_t    layer,
  output logic          busy,
  output logic          done,
  output logic          found,
  output logic [CW-1:0] best_idx,
  output dims_t         best_p,
  output logic [63:0]   best_da
);
  dims_t           table_p [MAX_CAND];
  layer_req_t      lay;
  logic [CW:0]     idx;

  always_ff @(posedge clk) begin
    if (cand_we) table_p[cand_idx] <= cand_p;
  end

  function automatic logic [63:0] cdiv(logic [63:0] a, logic [63:0] b);
    return (b == 0) ? 64'd0 : (a + b - 1) / b;
  endfunction

  // score of the candidate at idx
  dims_t       p;
  logic [63:0] da, dv, ptiles;
  logic        feasible;
  always_comb begin
    logic [63:0] i  [9];
    logic [63:0] i1 [9];
    logic [63:0] pp [9];
    logic [63:0] q  [9];
    logic [63:0] vwt, vif, vps, rwt, rif, rps;
    p = table_p[idx[CW-1:0]];
    for (int d = 0; d < 7; d++) begin
      i[d]  = 64'(lay.full[d]);
      i1[d] = 64'(lay.sub[d]);
      pp[d] = 64'(p[d]);
    end
    // 7 = X', 8 = Y'
    i[7]  = i[D_X] - i[D_S] + 1;    i1[7] = i1[D_X] - i1[D_S] + 1;  pp[7] = pp[D_X];
    i[8]  = i[D_Y] - i[D_R] + 1;    i1[8] = i1[D_Y] - i1[D_R] + 1;  pp[8] = pp[D_Y];
    for (int d = 0; d < 9; d++) q[d] = cdiv(i[d], i1[d] * pp[d]);
    vwt = i1[D_K]*pp[D_K] * i1[D_C]*pp[D_C] * i1[D_S]*pp[D_S] * i1[D_R]*pp[D_R];
    vif = i1[D_N]*pp[D_N] * i1[D_C]*pp[D_C] * i1[D_X]*pp[D_X] * i1[D_Y]*pp[D_Y];
    vps = i1[D_N]*pp[D_N] * i1[D_K]*pp[D_K] * i1[7]*pp[7] * i1[8]*pp[8];
    rwt = q[D_K] * q[D_C] * q[D_S] * q[D_R];
    rif = q[D_N] * q[D_K] * q[D_C] * q[D_S] * q[D_R] * q[7] * q[8];
    rps = q[D_N] * q[D_K] * q[D_S] * q[D_R] * q[7] * q[8] * (2 * q[D_C] - 1);
    da  = vwt * rwt + vif * rif + vps * rps;
    dv  = i1[D_K]*i1[D_C]*i1[D_S]*i1[D_R] + i1[D_N]*i1[D_C]*i1[D_X]*i1[D_Y]
        + i1[D_N]*i1[D_K]*i1[7]*i1[8];
    ptiles = pp[D_N]*pp[D_K]*pp[D_C]*pp[D_S]*pp[D_R]*pp[D_X]*pp[D_Y];
    feasible = (dv <= 64'(CDB)) && (ptiles <= 64'(NUM_TILES)) && (ptiles != 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      found    <= 1'b0;
      best_idx <= '0;
      best_p   <= '0;
      best_da  <= '0;
      idx      <= '0;
      lay      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          lay   <= layer;
          idx   <= '0;
          found <= 1'b0;
        end
      end else if (idx == ncand || idx == (CW+1)'(MAX_CAND)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        if (feasible && (!found || da < best_da)) begin
          found    <= 1'b1;
          best_idx <= idx[CW-1:0];
          best_p   <= p;
          best_da  <= da;
        end
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
