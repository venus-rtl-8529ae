// Shared types and constants of the Venus accelerator.
//
// Venus is a grid of tiles, each holding a slice of the distributed on-chip
// buffer and a 4x4 mesh of processing elements (PEs). Tiles talk over a
// flexible NoC whose routers can be configured into rings. This package
// holds the numbers the design is built around (16-bit operands, 32-bit
// partial sums, 16-bit buffer addresses) and the records that travel between
// blocks: NoC flits, router configuration words, tile commands, instructions
// and layer requests. The element widths, the instruction format and the
// opcodes are this design's own choices; grid size, PE count, MACs per PE and
// buffer capacities follow the document and are parameters of the modules.
package venus_pkg;

  localparam int unsigned DATA_W = 16;   // activation / weight width
  localparam int unsigned ACC_W  = 32;   // partial-sum width
  localparam int unsigned ADDR_W = 16;   // distributed-buffer word address
  localparam int unsigned LEN_W  = 16;
  localparam int unsigned ID_W   = 10;   // tile id (up to 32x32 tiles)
  localparam int unsigned RC_W   = 5;    // row / column index in the grid
  localparam int unsigned DIM_W  = 16;   // layer dimension

  // One NoC flit: a payload and the id of the tile that injected it.
  typedef struct packed {
    logic [ID_W-1:0]  src;
    logic [ACC_W-1:0] data;
  } flit_t;

  // Where the vertical switch of a router takes its ring input from.
  typedef enum logic [1:0] {
    VSRC_NORTH  = 2'd0,  // mesh link from the router above
    VSRC_RELINK = 2'd1,  // reconfigurable bypass link from a router of the same column
    VSRC_DLINK  = 2'd2,  // diagonal link from the bottom router of another column
    VSRC_OFF    = 2'd3   // not part of any ring
  } vsrc_e;

  // What the horizontal switch does with the row-wise partial-sum stream.
  typedef enum logic [2:0] {
    HMODE_OFF  = 3'd0,   // idle: nothing moves
    HMODE_HEAD = 3'd1,   // first router of a row chain: forward the tile's psums east
    HMODE_ACC  = 3'd2,   // add the tile's psum to the one arriving from the west
    HMODE_PASS = 3'd3,   // forward the west (or vertical) input unchanged
    HMODE_SINK = 3'd4    // end of a chain: eject the west input into the tile
  } hmode_e;

  typedef struct packed {
    vsrc_e            v_src;
    logic [RC_W-1:0]  relink_row;  // source row for VSRC_RELINK
    logic [RC_W-1:0]  dlink_col;   // source column for VSRC_DLINK
    hmode_e           h_mode;
    logic             h_from_v;    // Re-link joining the vertical output into the horizontal switch
  } router_cfg_t;

  // Tile commands.
  typedef enum logic [3:0] {
    TOP_NOP   = 4'd0,
    TOP_LDWT  = 4'd1,  // copy weights from the distributed buffer into the PE local buffers
    TOP_COMP  = 4'd2,  // stream inputs through the PE mesh and accumulate
    TOP_WB    = 4'd3,  // ReLU results of every PE lane back into the distributed buffer
    TOP_VSEND = 4'd4,  // inject a buffer range into the vertical ring
    TOP_RECV  = 4'd5,  // set where ring data received through the reuse FIFO is stored
    TOP_HSEND = 4'd6,  // inject a buffer range into the horizontal partial-sum chain
    TOP_WBRAW = 4'd7   // like WB but without ReLU
  } tile_op_e;

  typedef struct packed {
    tile_op_e          op;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } tile_cmd_t;

  // Instructions held in the instruction buffer.
  typedef enum logic [3:0] {
    IOP_END  = 4'd0,
    IOP_TILE = 4'd1,   // broadcast or unicast a tile command
    IOP_DMA  = 4'd2,   // DRAM -> distributed buffer of one tile
    IOP_CFG  = 4'd3,   // run dataflow selection and hardware configuration for the next request
    IOP_WAIT = 4'd4    // wait until every tile is idle
  } iop_e;

  localparam logic [ID_W-1:0] BCAST = '1;

  typedef struct packed {
    iop_e              op;      // 4
    tile_op_e          top;     // 4: tile command (IOP_TILE) or DRAM channel (IOP_DMA)
    logic [ID_W-1:0]   tile;    // 10
    logic [ADDR_W-1:0] addr;    // 16
    logic [LEN_W-1:0]  len;     // 16
    logic [23:0]       ext;     // 24: DRAM word address for IOP_DMA
  } instr_t;                    // 74 bits

  // A layer as seen by the dataflow selection: full and sub-layer sizes.
  // Index order of the arrays: N, K, C, S, R, X, Y.
  localparam int unsigned D_N = 0, D_K = 1, D_C = 2, D_S = 3, D_R = 4, D_X = 5, D_Y = 6;
  typedef logic [6:0][DIM_W-1:0] dims_t;

  typedef struct packed {
    dims_t full;   // i
    dims_t sub;    // i_1
  } layer_req_t;

endpackage
