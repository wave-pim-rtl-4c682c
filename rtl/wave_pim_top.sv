// wave_pim_top: a Wave-PIM chip, tiles of computing memory blocks under one
// central controller.
//
// The chip has 4^CHIP_LEVELS tiles of 4^TILE_LEVELS memory blocks of
// ROWS x COLS bits; the defaults, 16 tiles of 256 blocks of 1024 x 1024, make
// the paper's 512 MB configuration (4096 blocks, 32 MB per tile). The paper's
// main 2 GB chip is CHIP_LEVELS = 3 (64 tiles); at that size the lint and
// synthesis tools need more memory than is safe, so the default is one step
// smaller. The host
// drives the instruction port; the central controller decodes each
// instruction and broadcasts block commands to all tiles. Blocks compute in
// place with row-parallel NORs and exchange words over an H-tree: the tiles'
// trees (levels 0..TILE_LEVELS-1) are joined by a chip-level tree of the same
// switches (levels TILE_LEVELS.. up), so any block can reach any other. Block
// ids run tile by tile: block b of tile t is t*4^TILE_LEVELS + b.
//
// Ports: ins_valid/ins_ready/ins/ins_data carry host instructions (see
// wavepim_pkg for their layouts); resp_valid/resp_data return READ results.
// The host CPU and the off-chip DRAM are outside this module; loading data
// from DRAM is done with WRITE instructions.
//
// The tile/block hierarchy, the H-tree and the central controller follow the
// paper. The paper places H-trees inside tiles and does not describe the link
// between tiles; continuing the same tree above the tiles is this design's
// choice.
module wave_pim_top
  import wavepim_pkg::*;
#(
  parameter int ROWS        = 1024,
  parameter int COLS        = 1024,
  parameter int TILE_LEVELS = 4,
  parameter int CHIP_LEVELS = 2,
  localparam int NTILE      = 4 ** CHIP_LEVELS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins_valid,
  output logic              ins_ready,
  input  logic [63:0]       ins,
  input  logic [WORD_W-1:0] ins_data,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_data
);
  logic              cmd_valid;
  blk_cmd_t          cmd;
  logic [NTILE-1:0]  t_busy, t_empty, t_rvalid;
  logic [WORD_W-1:0] t_rdata [NTILE];
  logic [NTILE-1:0]  up_valid, up_ready, dn_valid, dn_ready;
  pkt_t              up_pkt [NTILE];
  pkt_t              dn_pkt [NTILE];
  logic              top_empty, root_up_valid, root_dn_ready;
  pkt_t              root_up_pkt;
  logic [WORD_W-1:0] rdata_or;

  central_controller #(.ROWS(ROWS), .COLS(COLS)) u_ctrl (
    .clk, .rst_n,
    .ins_valid, .ins_ready, .ins, .ins_data, .resp_valid, .resp_data,
    .cmd_valid, .cmd,
    .blk_busy      (|t_busy),
    .net_empty     ((&t_empty) && top_empty),
    .blk_resp_valid(|t_rvalid),
    .blk_resp_data (rdata_or)
  );

  for (genvar t = 0; t < NTILE; t++) begin : g_tile
    pim_tile #(.ROWS(ROWS), .COLS(COLS), .TILE_LEVELS(TILE_LEVELS)) u_tile (
      .clk, .rst_n,
      .tile_idx  (BLK_W'(t)),
      .cmd_valid, .cmd,
      .busy      (t_busy[t]),
      .empty     (t_empty[t]),
      .resp_valid(t_rvalid[t]),
      .resp_data (t_rdata[t]),
      .up_valid  (up_valid[t]), .up_ready(up_ready[t]), .up_pkt(up_pkt[t]),
      .dn_valid  (dn_valid[t]), .dn_ready(dn_ready[t]), .dn_pkt(dn_pkt[t])
    );
  end

  // chip-level H-tree: its leaves are the tiles' top switches. Nothing lies
  // above its root, so packets to a block id past the last tile are dropped.
  htree_net #(.LEVELS(CHIP_LEVELS), .BASE_LEVEL(TILE_LEVELS)) u_chip_net (
    .clk, .rst_n,
    .net_idx      ('0),
    .leaf_up_valid(up_valid), .leaf_up_ready(up_ready), .leaf_up_pkt(up_pkt),
    .leaf_dn_valid(dn_valid), .leaf_dn_ready(dn_ready), .leaf_dn_pkt(dn_pkt),
    .root_up_valid(root_up_valid), .root_up_ready(1'b1), .root_up_pkt(root_up_pkt),
    .root_dn_valid(1'b0), .root_dn_ready(root_dn_ready), .root_dn_pkt('0),
    .empty        (top_empty)
  );

  always_comb begin
    rdata_or = '0;
    for (int t = 0; t < NTILE; t++) if (t_rvalid[t]) rdata_or |= t_rdata[t];
  end
endmodule
