// Hardware configuration unit: turns the chosen dataflow into router
// configurations.
//
// Following the document, the tiles that share an input-channel slice
// (same c) form one ring, so P_C rings are built; weights and activations
// move down the ring tile by tile, and partial sums are accumulated
// horizontally along each row, the last router of the row handing out the
// result. Placement of the rings (this design's choice):
//   * P_C <= COLS: ring j takes COLS/P_C whole columns. Inside a column the
//     ring follows the mesh link down; the top router of each later column
//     takes the bottom of the previous column over a D-link; the top router
//     of the first column closes the ring with a D-link from the bottom of
//     the last column (or a Re-link when the ring is a single column).
//   * P_C > COLS: each column holds P_C/COLS rings of ROWS*COLS/P_C rows;
//     the top router of each segment closes it with a Re-link from the
//     segment's bottom router.
//   * A ring of one tile, or tiles left over, are switched off.
// In every row the first router starts the partial-sum chain (HEAD) and the
// others add their tile's partial sum (ACC).
//
// Timing: after `start` the unit writes one router configuration per cycle
// (`cfg_we`, `cfg_idx`, `cfg_data`, router index = row*COLS + col) and
// pulses `done` after the last of the ROWS*COLS writes.
module hw_config
  import venus_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DIM_W-1:0]  p_c,
  output logic              busy,
  output logic              done,
  output logic              cfg_we,
  output logic [ID_W-1:0]   cfg_idx,
  output router_cfg_t       cfg_data
);
  localparam int unsigned NT = ROWS * COLS;
  logic [DIM_W-1:0] pc_r;
  logic [ID_W:0]    k;

  always_comb begin
    int r, c, w, h, q, cols_used, rows_used;
    w = 1; h = 1; q = 1; cols_used = 0; rows_used = 0;
    r = int'(k) / COLS;
    c = int'(k) % COLS;
    cfg_data = '{v_src: VSRC_OFF, h_mode: (c == 0) ? HMODE_HEAD : HMODE_ACC, default: '0};
    if (pc_r != 0 && int'(pc_r) <= COLS) begin
      w = COLS / int'(pc_r);
      cols_used = w * int'(pc_r);
      if (c < cols_used && !(w == 1 && ROWS == 1)) begin
        if (r != 0) cfg_data.v_src = VSRC_NORTH;
        else if (c % w != 0) begin
          cfg_data.v_src     = VSRC_DLINK;
          cfg_data.dlink_col = RC_W'(c - 1);
        end else if (w == 1) begin
          cfg_data.v_src      = VSRC_RELINK;
          cfg_data.relink_row = RC_W'(ROWS - 1);
        end else begin
          cfg_data.v_src     = VSRC_DLINK;
          cfg_data.dlink_col = RC_W'(c + w - 1);
        end
      end
    end else if (pc_r != 0 && int'(pc_r) <= NT) begin
      q = int'(pc_r) / COLS;          // rings per column
      h = ROWS / q;                   // rows per ring
      rows_used = h * q;
      if (h > 1 && r < rows_used) begin
        if (r % h != 0) cfg_data.v_src = VSRC_NORTH;
        else begin
          cfg_data.v_src      = VSRC_RELINK;
          cfg_data.relink_row = RC_W'(r + h - 1);
        end
      end
    end
  end

  assign cfg_idx = ID_W'(k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cfg_we <= 1'b0;
      k      <= '0;
      pc_r   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        cfg_we <= 1'b0;
        if (start) begin
          busy   <= 1'b1;
          pc_r   <= p_c;
          k      <= '0;
          cfg_we <= 1'b1;
        end
      end else if (k == (ID_W+1)'(NT - 1)) begin
        busy   <= 1'b0;
        done   <= 1'b1;
        cfg_we <= 1'b0;
      end else begin
        k <= k + 1'b1;
      end
    end
  end
endmodule
