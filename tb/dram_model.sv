// Behavioural model of one off-chip DRAM channel, for testbenches only.
// Word at address a holds dram_word(a) = (a*37 + 11) mod 61 - 30, a small
// signed value, so a testbench can compute any expected result from the
// address alone. Reads are answered in order LAT cycles after the request;
// a response waits while rsp_ready is low. Requests are refused at random
// when STALL is set.
module dram_model
  import venus_pkg::*;
#(
  parameter int unsigned LAT   = 6,
  parameter bit          STALL = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [23:0]       req_addr,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [DATA_W-1:0] rsp_data
);
  typedef struct { longint due; logic [DATA_W-1:0] d; } rsp_t;
  rsp_t   q [$];
  longint now = 0;

  function automatic logic [DATA_W-1:0] dram_word(logic [23:0] a);
    return DATA_W'(int'((longint'(a) * 37 + 11) % 61) - 30);
  endfunction

  always @(negedge clk) req_ready <= STALL ? (($urandom % 4) != 0) : 1'b1;

  assign rsp_valid = rst_n && q.size() > 0 && q[0].due <= now;
  assign rsp_data  = (q.size() > 0) ? q[0].d : '0;

  always @(posedge clk) begin
    now <= now + 1;
    if (rst_n) begin
      if (rsp_valid && rsp_ready) void'(q.pop_front());
      if (req_valid && req_ready) q.push_back('{due: now + LAT, d: dram_word(req_addr)});
    end
  end
endmodule
