# Venus: a tiled DNN accelerator whose network-on-chip forms rings

Venus is an accelerator for convolutional and fully connected DNN layers. Its on-chip memory is not one global buffer. Instead it is split into 1024 slices of 100 KB, one in each tile of a 32 x 32 array.

A distributed buffer like this only pays off if no tile has to hold data that another tile already holds. The layer is therefore cut along at least two loop indices of both the weights and the inputs, and always along the input channels C. The tiles that share a slice of C then need each other's data, and nothing else.

Venus connects exactly those tiles in a ring:

- Weights or activations travel round the ring, so every member gets a copy.
- Partial sums are added up along each row of tiles.
- A small control unit decides, for every layer, how to cut it. It scores a list of candidate partitions by the DRAM traffic each would cause and picks the cheapest one that fits the buffers.
- It then rewires the network into the matching rings, and runs a program of DMA, compute and communication instructions.

This repository holds synthesizable SystemVerilog for the whole on-chip design, and a self-checking testbench for every block and for the complete accelerator.

## Block hierarchy

```
venus_top
├── host_interface          register port for the host CPU
├── request_dispatcher      queue of layer requests            (flit_fifo)
├── dataflow_selection      picks the parallel factors with the least DRAM traffic
├── hw_config               turns P_C into one configuration word per router
├── instruction_buffer      program memory
├── instruction_dispatcher  fetch, decode, issue, completion tracking
├── dram_interface x NCH    DMA channels to off-chip DRAM
├── crossbar                DMA channels -> tile rows, all-to-all
├── flexible_noc            ROWS x COLS routers plus Re-links and D-links
│   └── flexible_router
│       ├── vertical_switch    ring stop (flit_fifo queues)
│       └── horizontal_switch  partial-sum chain along a row
└── tile x ROWS*COLS
    ├── distributed_buffer  100 KB slice (51200 x 16 bit)
    ├── reuse_fifo          double buffer for data arriving from the NoC
    ├── router_interface    tile <-> router ports
    └── pe_mesh             4 x 4 PEs
        └── pe
            ├── local_buffer     5 KB of weights (160 x 16 lanes x 16 bit)
            ├── data_dispatcher  pairs activations with weights
            ├── mac_array        16 MAC lanes
            └── processing_unit  ReLU
```

Shared types live in `venus_pkg`:
- the flit (`flit_t`: 10-bit source tile number, 32-bit data);
- the router configuration word;
- tile commands and instructions;
- layer dimensions.

## Numbers

- Data words are 16-bit signed. Accumulators and NoC payloads are 32-bit.
- At the defaults the array holds 1024 tiles, 16384 PEs and 262144 multipliers.
- It holds 100 MB of distributed buffer and 80 MB of PE local buffers.
- The intended clock is 700 MHz. The RTL contains no timing constraint.

## Choosing a dataflow (`dataflow_selection`)

### Inputs

A layer is described by seven sizes: N (batch), K (output channels), C (input channels), S and R (kernel), X and Y (input width and height). Two derived sizes are used: X' = X-S+1 and Y' = Y-R+1.

A request carries two sets of these sizes:
- the full layer;
- the sub-layer i_1 that one tile works on at a time.

A candidate dataflow is a set of parallel factors P_N ... P_Y, the number of tiles each index is spread over. The host writes up to 19 candidates into a table.

### Scoring

After `start`, the unit scores one candidate per clock cycle. With q_i = ceil(i / (i_1 * P_i)) and P_X' = P_X, P_Y' = P_Y:

```
V_wt = Π(i_1·P_i), i ∈ {K,C,S,R}      R_wt = Π q_i, i ∈ {K,C,S,R}
V_if = Π(i_1·P_i), i ∈ {N,C,X,Y}      R_if = Π q_i, i ∈ {N,K,C,S,R,X',Y'}
V_ps = Π(i_1·P_i), i ∈ {N,K,X',Y'}    R_ps = Π q_i, i ∈ {N,K,S,R,X',Y'} · (2·q_C − 1)
DA   = V_wt·R_wt + V_if·R_if + V_ps·R_ps
```

These are the weight-stationary counts of DRAM words per invocation and of invocations:
- Weights are fetched once per weight tile.
- Inputs are fetched again for every K, S and R slice.
- Partial sums are written once and read back and rewritten for every further slice of C, which gives the 2·q_C − 1 factor.

### Feasibility

A candidate is feasible when both of these hold:
- the sub-layer fits one distributed buffer: Π i_1 over {K,C,S,R} + Π i_1 over {N,C,X,Y} + Π i_1 over {N,K,X',Y'} ≤ 51200 words;
- the candidate needs at most 1024 tiles (Π P_i ≤ 1024).

### Result

- The smallest DA among feasible candidates wins. Ties go to the earlier table entry.
- `done` pulses ncand+1 cycles after the first scoring cycle.
- The result is `found`, `best_idx`, `best_p` and `best_da`.
- All arithmetic is 64-bit and combinational. This is the longest path in the design; the 700 MHz target would need it pipelined.

## From P_C to rings (`hw_config`, `flexible_noc`)

### Ring placement

Tiles that hold the same slice of C share inputs, so they form one ring. `hw_config` gets P_C from the selection and builds P_C rings:

- **P_C ≤ COLS.** A ring takes w = COLS/P_C whole columns.
  - Inside a column, a router takes its vertical input from its north neighbour.
  - The top router of each later column takes the bottom router of the previous column over a **D-link**.
  - The top router of the first column closes the ring with a D-link from the bottom of the ring's last column.
  - A ring only one column wide is closed with a **Re-link** from the bottom row of its own column.
- **P_C > COLS.** Each column is cut into P_C/COLS segments of ROWS·COLS/P_C rows. Each segment is a ring, closed by a Re-link from its last row to its first.
- Tiles left over, and rings of a single tile, are switched off.

In every row, the router in column 0 starts the partial-sum chain (HEAD). The others add their tile's value to it (ACC). The row sum leaves at the east edge as `res[row]`.

`hw_config` writes one router configuration per cycle, so 1024 cycles at the default size, and then pulses `done`.

### Configuration word

Each router has one configuration word (`router_cfg_t`):

| field | meaning |
|---|---|
| `v_src` | vertical input: NORTH neighbour, RELINK, DLINK, or OFF (router not in a ring) |
| `relink_row` | Re-link source: the vertical output of this row, same column |
| `dlink_col` | D-link source: the vertical output of the bottom router of this column |
| `h_mode` | OFF, HEAD (start the row chain with the tile's value), ACC (west + tile), PASS (forward west), SINK (deliver west to the tile) |
| `h_from_v` | feed the router's vertical output into its horizontal switch (joins the two switches of one router) |

Re-links and D-links are multiplexers. Each router input selects one vertical output elsewhere in the array. A vertical output's ready is the OR of the readies of every router that selects it.

### Ring protocol (`vertical_switch`)

Every flit carries the number of the tile that injected it. In each cycle, a ring stop does one of these:

- A flit from another tile is delivered to the local tile and, in the same cycle, forwarded to the next stop. Every ring member thus receives every other member's data exactly once. The flit waits if either side is not ready.
- A flit that arrives back at the tile that sent it is removed.
- When no ring flit is waiting, the local tile may inject one. Traffic already on the ring always goes first, so the ring cannot fill up with new injections and deadlock.

Both inputs are queued (4 flits each). All links use valid/ready handshakes. A flit moves when both are high at a clock edge.

### Partial sums (`horizontal_switch`)

In ACC mode the switch waits until it has both a west flit and a tile flit. It then sends their 32-bit sum east, stamped with its own tile number. One sum per row therefore needs every tile of the row to send one value, in the same order.

## Inside a tile

### Tile commands

A tile runs one command at a time (`tile_cmd_t`: op, 16-bit address, 16-bit length). `busy` is high while it runs.

| op | effect | cycles |
|---|---|---|
| LDWT a,L | PE p, entry e, lane l ← DB[a + (p·L + e)·16 + l] | 16·16·L + 1 |
| COMP a,L | clear every PE; stream DB[a + r·L + i], i < L, into mesh row r | PR·L + PC + 4 |
| WB a | DB[a + p·16 + l] ← ReLU(acc of PE p, lane l), low 16 bits | 256 |
| WBRAW a | same without ReLU | 256 |
| VSEND a,L | put DB[a .. a+L−1] on the ring | 2 per word |
| HSEND a,L | put DB[a .. a+L−1] on the row's partial-sum chain | 2 per word |
| RECV a | data arriving from the NoC is stored from a on; `rx_count` counts it | 1 |

### Data movement

- **COMP.** The activations of a mesh row enter its west PE and move east through one register per PE. Each PE multiplies the activation by entry i of its local buffer in all 16 lanes. After COMP, PE (r, c) lane l holds Σ_i A[r][i] · W_{r,c}[i][l]. That is a weight-stationary dot product of length L ≤ 160 for each of 256 output values per tile.
- **Incoming NoC data.** Data from the router always passes through the reuse FIFO. This is a double buffer of two 16-word banks. A bank is handed to the buffer side when it is full, or when the input pauses with the bank not empty. The NoC can keep filling one bank while the other drains into the distributed buffer.
- **Buffer write priority.** The distributed buffer has one write port:
  - DMA data from the crossbar has priority, and has no back-pressure;
  - then write-back (WB and WBRAW);
  - then the reuse FIFO.

## Control unit and programming model

### Host register map

The host sees a register port (`host_we`, 8-bit `host_addr`, 32-bit `host_wdata`, `host_rdata`).

| address | write | read |
|---|---|---|
| 0x00 | bit 0: start the program at address 0 | {done, busy} |
| 0x01 | | {found, best candidate index} |
| 0x02 / 0x03 | | best DA, low / high word |
| 0x04 | | requests waiting |
| 0x10–0x16 | full layer N,K,C,S,R,X,Y | |
| 0x18–0x1E | sub-layer N,K,C,S,R,X,Y | |
| 0x1F | post the staged layer as a request | |
| 0x20 | candidate index | |
| 0x21–0x27 | P_N..P_Y | |
| 0x28 | write the candidate | |
| 0x29 | number of candidates | |
| 0x30 | instruction address | |
| 0x31–0x33 | instruction bits [31:0], [63:32], [73:64] | |
| 0x34 | write the instruction and step the address | |

### Instruction format

An instruction (`instr_t`, 74 bits, MSB first) has these fields:
- `op` (4 bits);
- `top` (4 bits): the tile op, or the DRAM channel for DMA;
- `tile` (10 bits): all ones means every tile;
- `addr` (16 bits);
- `len` (16 bits);
- `ext` (24 bits): the DRAM address.

| op | action |
|---|---|
| CFG | pop the next layer request, run selection, and write the router configurations. If no request is waiting or no candidate fits, the configuration is left as it was. |
| DMA | channel `top` reads `len` words from DRAM `ext` into DB[`addr`] of `tile` |
| TILE | wait until every tile is idle, then send tile command (`top`, `addr`, `len`) to `tile` |
| WAIT | wait until every tile and every DMA channel is idle |
| END | stop; `prog_done` goes high |

### Example program

The end-to-end testbench runs one layer step like this:

```
CFG; DMA weights and activations to every tile; WAIT
TILE LDWT; TILE COMP; TILE WBRAW          -- partial sums in every tile
TILE RECV; TILE VSEND; WAIT               -- activations go round the rings
TILE HSEND; WAIT                          -- row sums leave at res[row]
CFG; TILE RECV; TILE VSEND; WAIT; END     -- next layer, new rings
```

### DRAM ports

The DRAM is outside the design. Each of the NCH = 4 channels has a read request port (`mem_req_*`, 24-bit word address) and an in-order response port (`mem_rsp_*`). `dram_interface` keeps up to 8 reads outstanding.

The `crossbar` gives each tile row one write port per cycle. It arbitrates round-robin among the channels that target the row.

## Parameters

| parameter | default | origin |
|---|---|---|
| ROWS x COLS | 32 x 32 tiles | the document's evaluated design |
| PR x PC | 4 x 4 PEs per tile | the document |
| LANES | 16 MACs per PE | the document |
| LB_DEPTH | 160 entries (5 KB per PE) | the document's 5 KB |
| DB_DEPTH | 51200 words (100 KB per tile) | the document's 100 KB |
| MAX_CAND | 19 candidates | the document's candidate list |
| FIFO_BANK | 16 words | this design |
| QDEPTH | 4 flits | this design |
| NCH | 4 DRAM channels | this design |
| IB_DEPTH | 256 instructions | this design |

The 16-bit word width is this design's choice. The document gives only byte capacities.

## Where the RTL differs from the document, or goes beyond it

- **Links.** The router description attaches Re-links to the vertical switch and D-links to the horizontal one. The ring placement, however, closes column rings through both. Here both link types feed the vertical (ring) input, and `h_from_v` provides the link between a router's two switches.
- **Ring layouts.** Only the weight- and input-stationary grouping is built: tiles with the same C share a ring. The groupings for row-stationary (same C and Y) and output-stationary (same C, X, Y or same C, S, R) dataflows are not generated by `hw_config`. The router configuration registers can still be written for them.
- **Partial-sum term of the buffer-capacity check.** This uses {N, K, X', Y'}, the size of a partial-sum tile. The document's capacity formula lists C there.
- **Invocation counts.** These are rounded up.
- **Candidates.** The host loads the candidate list. Nothing is fixed in hardware.
- **Software's job.** The instruction set, tile commands, host register map, DMA engine, crossbar arbitration, ring protocol and reuse-FIFO hand-over rules are this design's own. The same goes for the tile's data layout. Splitting a layer into sub-layers, generating the program and collecting results from `res` are left to software.
- **Instruction buffer.** 256 entries is far less than a full network needs at 1024 tiles. The host refills it between program runs.
- **Processing unit.** Only ReLU is implemented.

## Verification

Every block has a self-checking testbench in `tb/`:
- Each compares against values computed in the testbench.
- Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb/dram_model.sv` is a behavioural DRAM channel. Word a holds (37a + 11) mod 61 − 30. It has a fixed latency and random request stalls.

These testbenches run at the full default sizes:
- the storage blocks (51200-word buffer, 160-entry local buffer);
- `mac_array`, `pe`, `pe_mesh` (4 x 4 PEs, 16 lanes);
- `dataflow_selection` with VGG-like layers.

The others use reduced sizes:
- the NoC, `hw_config` and `crossbar` at 4 x 4 tiles;
- `tile` at 2 x 2 PEs with 4 lanes.

`tb_venus_top` runs the whole accelerator on 2 x 4 tiles of 2 x 2 PEs with 4 lanes and 1024-word buffers. It runs the program shown above and checks:
- both dataflow choices, against DRAM-access volumes worked out by hand;
- every row sum;
- the data each tile received over its ring;
- that each mechanism occurred: crossbar contention, DRAM stalls, ring copies, D-link and Re-link rings, row accumulation, back-pressure on `res`, and reconfiguration between layers.

`tb_workloads` runs `dataflow_selection` at its default sizes over the layers of the four networks Venus was designed for:
- VGG-16: all 13 convolutions and 3 fully connected layers;
- AlexNet: 5 convolutions and 3 fully connected layers;
- ResNeXt-50: the stem, the first and the last stage, and the classifier;
- GoogLeNet: the stem, inception 3a, one 5b branch, and the classifier.

It uses 19 candidate partitions. For each layer it checks that a candidate fits, and that the unit picks the winner recomputed in the testbench.

The 2 x 4 tile configuration of `tb_venus_top` is the largest configuration of the complete design that has been simulated. The 32 x 32 default is too large to simulate in useful time:
- 1024 tiles of 100 KB;
- 262144 multipliers.

The full-size design has been linted and elaborated. Verilator lint needs about 12 GB of memory and just over 2 minutes at 32 x 32. It scales about linearly with the number of tiles: 0.8 GB at 8 x 8 and 3.2 GB at 16 x 16.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/venus_pkg.sv tb/tb_venus_top.sv --top-module tb_venus_top
./obj_dir/Vtb_venus_top +verilator+rand+reset+2
```

Any other testbench works the same way with its own name.
