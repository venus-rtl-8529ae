// DRAM interface channel.
//
// Moves a block of words from off-chip DRAM into the distributed buffer of
// one tile. A job (`job_*`) gives the DRAM word address, the destination
// tile, the buffer address and the length. The channel issues one read
// request per word (`mem_req_*`), takes the responses, which the DRAM
// returns in order, and labels each with its destination tile and buffer
// address before handing it to the crossbar (`out_*`). At most MAX_OUT reads
// are outstanding. The document only names this interface; the job format,
// in-order responses and the outstanding limit are this design's choices.
module dram_interface
  import venus_pkg::*;
#(
  parameter int unsigned MAX_OUT = 8,
  parameter int unsigned DRAM_AW = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               job_valid,
  output logic               job_ready,
  input  logic [DRAM_AW-1:0] job_dram_addr,
  input  logic [ID_W-1:0]    job_tile,
  input  logic [ADDR_W-1:0]  job_db_addr,
  input  logic [LEN_W-1:0]   job_len,
  output logic               busy,
  // to the DRAM
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic [DRAM_AW-1:0] mem_req_addr,
  input  logic               mem_rsp_valid,
  output logic               mem_rsp_ready,
  input  logic [DATA_W-1:0]  mem_rsp_data,
  // to the crossbar
  output logic               out_valid,
  input  logic               out_ready,
  output logic [ID_W-1:0]    out_tile,
  output logic [ADDR_W-1:0]  out_addr,
  output logic [DATA_W-1:0]  out_data
);
  logic [DRAM_AW-1:0] base;
  logic [ID_W-1:0]    tile_r;
  logic [ADDR_W-1:0]  db_r;
  logic [LEN_W-1:0]   len_r, issued, returned;
  logic [$clog2(MAX_OUT+1)-1:0] outstanding;
  logic req_fire, rsp_fire;

  assign job_ready     = !busy;
  assign mem_req_valid = busy && issued != len_r && outstanding != ($clog2(MAX_OUT+1))'(MAX_OUT);
  assign mem_req_addr  = base + DRAM_AW'(issued);
  assign req_fire      = mem_req_valid && mem_req_ready;

  assign out_valid     = mem_rsp_valid && busy;
  assign out_tile      = tile_r;
  assign out_addr      = db_r + returned;
  assign out_data      = mem_rsp_data;
  assign mem_rsp_ready = out_ready && busy;
  assign rsp_fire      = mem_rsp_valid && mem_rsp_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      base        <= '0;
      tile_r      <= '0;
      db_r        <= '0;
      len_r       <= '0;
      issued      <= '0;
      returned    <= '0;
      outstanding <= '0;
    end else begin
      if (job_valid && job_ready) begin
        busy     <= job_len != '0;
        base     <= job_dram_addr;
        tile_r   <= job_tile;
        db_r     <= job_db_addr;
        len_r    <= job_len;
        issued   <= '0;
        returned <= '0;
      end else if (busy) begin
        if (req_fire) issued <= issued + 1'b1;
        if (rsp_fire) begin
          returned <= returned + 1'b1;
          if (returned + 1'b1 == len_r) busy <= 1'b0;
        end
      end
      outstanding <= outstanding + ($clog2(MAX_OUT+1))'(req_fire) - ($clog2(MAX_OUT+1))'(rsp_fire);
    end
  end
endmodule
