// dpu_top: the database processing unit, one instance of every tile.
//
// The tiles are relational-algebra operators that work on streams of 32-bit
// column elements: boolgen (per-element predicate), colfilter (keep flagged
// elements), sorter (sorts blocks of 32 four-column tuples), joiner (merge
// equi-join, four columns), ALU (per-element arithmetic) and aggregator
// (group-by). A query plan is run by streaming columns into tile inputs,
// collecting the tile outputs and feeding them to the next tile; in the
// reference system a host CPU does this through a vendor FIFO on every tile
// port. Those FIFOs and the host are not part of this RTL: every tile stream
// port is a port of dpu_top, an Avalon-ST link with ready latency 1
// (x_in_valid / x_in_flit / x_in_ready into a tile, x_out_* out of it; a flit is
// a 32-bit word plus the done bit that ends a stream).
//
// Configuration is one write port shared by the configurable tiles (own
// address map): cfg_addr[4:2] selects the tile, cfg_addr[1:0] its register.
//   tile 0 boolgen    : reg 0 {use_const, cond[2:0]}, reg 1 constant
//   tile 1 joiner     : reg 0 payload-is-candidate bits
//   tile 2 ALU        : reg 0 opcode[2:0], reg 1 constant
//   tile 3 aggregator : reg 0 opcode[2:0]
// The colfilter and the sorter have no configuration.
module dpu_top
  import dpu_pkg::*;
#(
  parameter int unsigned SORT_COLS = 4,
  parameter int unsigned SORT_K    = 32,
  parameter int unsigned JOIN_COLS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // configuration writes
  input  logic                  cfg_write,
  input  logic [4:0]            cfg_addr,
  input  word_t                 cfg_wdata,
  // boolgen: 2 in, 1 out
  input  logic [1:0]            bg_in_valid,
  input  flit_t [1:0]           bg_in_flit,
  output logic [1:0]            bg_in_ready,
  output logic                  bg_out_valid,
  output flit_t                 bg_out_flit,
  input  logic                  bg_out_ready,
  // colfilter: 2 in, 1 out
  input  logic [1:0]            cf_in_valid,
  input  flit_t [1:0]           cf_in_flit,
  output logic [1:0]            cf_in_ready,
  output logic                  cf_out_valid,
  output flit_t                 cf_out_flit,
  input  logic                  cf_out_ready,
  // sorter: SORT_COLS in, SORT_COLS out
  input  logic [SORT_COLS-1:0]  so_in_valid,
  input  flit_t [SORT_COLS-1:0] so_in_flit,
  output logic [SORT_COLS-1:0]  so_in_ready,
  output logic [SORT_COLS-1:0]  so_out_valid,
  output flit_t [SORT_COLS-1:0] so_out_flit,
  input  logic [SORT_COLS-1:0]  so_out_ready,
  // joiner: JOIN_COLS in, JOIN_COLS out
  input  logic [JOIN_COLS-1:0]  jn_in_valid,
  input  flit_t [JOIN_COLS-1:0] jn_in_flit,
  output logic [JOIN_COLS-1:0]  jn_in_ready,
  output logic [JOIN_COLS-1:0]  jn_out_valid,
  output flit_t [JOIN_COLS-1:0] jn_out_flit,
  input  logic [JOIN_COLS-1:0]  jn_out_ready,
  // ALU: 2 in, 1 out
  input  logic [1:0]            alu_in_valid,
  input  flit_t [1:0]           alu_in_flit,
  output logic [1:0]            alu_in_ready,
  output logic                  alu_out_valid,
  output flit_t                 alu_out_flit,
  input  logic                  alu_out_ready,
  // aggregator: 2 in, 1 out
  input  logic [1:0]            ag_in_valid,
  input  flit_t [1:0]           ag_in_flit,
  output logic [1:0]            ag_in_ready,
  output logic                  ag_out_valid,
  output flit_t                 ag_out_flit,
  input  logic                  ag_out_ready
);

  localparam logic [2:0] TILE_BOOLGEN = 3'd0;
  localparam logic [2:0] TILE_JOINER  = 3'd1;
  localparam logic [2:0] TILE_ALU     = 3'd2;
  localparam logic [2:0] TILE_AGGR    = 3'd3;

  logic [1:0] reg_sel;
  assign reg_sel = cfg_addr[1:0];

  boolgen_tile u_boolgen (
    .clk, .rst_n,
    .cfg_write (cfg_write && cfg_addr[4:2] == TILE_BOOLGEN),
    .cfg_addr  (reg_sel), .cfg_wdata,
    .in_valid  (bg_in_valid),  .in_flit (bg_in_flit),  .in_ready (bg_in_ready),
    .out_valid (bg_out_valid), .out_flit(bg_out_flit), .out_ready(bg_out_ready)
  );

  colfilter_tile u_colfilter (
    .clk, .rst_n,
    .in_valid  (cf_in_valid),  .in_flit (cf_in_flit),  .in_ready (cf_in_ready),
    .out_valid (cf_out_valid), .out_flit(cf_out_flit), .out_ready(cf_out_ready)
  );

  sorter_tile #(.NCOLS(SORT_COLS), .K(SORT_K)) u_sorter (
    .clk, .rst_n,
    .in_valid  (so_in_valid),  .in_flit (so_in_flit),  .in_ready (so_in_ready),
    .out_valid (so_out_valid), .out_flit(so_out_flit), .out_ready(so_out_ready)
  );

  joiner_tile #(.NCOLS(JOIN_COLS)) u_joiner (
    .clk, .rst_n,
    .cfg_write (cfg_write && cfg_addr[4:2] == TILE_JOINER),
    .cfg_addr  (reg_sel), .cfg_wdata,
    .in_valid  (jn_in_valid),  .in_flit (jn_in_flit),  .in_ready (jn_in_ready),
    .out_valid (jn_out_valid), .out_flit(jn_out_flit), .out_ready(jn_out_ready)
  );

  alu_tile u_alu (
    .clk, .rst_n,
    .cfg_write (cfg_write && cfg_addr[4:2] == TILE_ALU),
    .cfg_addr  (reg_sel), .cfg_wdata,
    .in_valid  (alu_in_valid),  .in_flit (alu_in_flit),  .in_ready (alu_in_ready),
    .out_valid (alu_out_valid), .out_flit(alu_out_flit), .out_ready(alu_out_ready)
  );

  aggregator_tile u_aggr (
    .clk, .rst_n,
    .cfg_write (cfg_write && cfg_addr[4:2] == TILE_AGGR),
    .cfg_addr  (reg_sel), .cfg_wdata,
    .in_valid  (ag_in_valid),  .in_flit (ag_in_flit),  .in_ready (ag_in_ready),
    .out_valid (ag_out_valid), .out_flit(ag_out_flit), .out_ready(ag_out_ready)
  );

endmodule
