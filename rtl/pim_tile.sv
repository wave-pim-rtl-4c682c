// pim_tile: one memory tile, 4^TILE_LEVELS memory blocks joined by an H-tree.
//
// All blocks of the tile receive the controller's command bus; a command is
// taken by the block it names or by every block when it is a broadcast. Block
// b of tile t has the global id t*NBLK + b, the number H-tree routing uses.
// The tile's H-tree (htree_net, levels 0..TILE_LEVELS-1) connects the blocks
// to each other and, through its top switch, to the chip-level tree.
//
// busy is the OR of the blocks' busy flags, empty is high when the tile's
// switches hold no packet, and resp_valid/resp_data is the OR of the blocks'
// read responses (only the addressed block answers a read). busy, empty and
// the response are registered once here, so they reach the controller one
// cycle late.
//
// Defaults follow the paper's 2 GB chip: 256 blocks of 1024 x 1024 per tile.
module pim_tile
  import wavepim_pkg::*;
#(
  parameter int ROWS        = 1024,
  parameter int COLS        = 1024,
  parameter int TILE_LEVELS = 4,
  localparam int NBLK       = 4 ** TILE_LEVELS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BLK_W-1:0]  tile_idx,
  input  logic              cmd_valid,
  input  blk_cmd_t          cmd,
  output logic              busy,
  output logic              empty,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_data,
  // top switch <-> chip-level tree
  output logic              up_valid,
  input  logic              up_ready,
  output pkt_t              up_pkt,
  input  logic              dn_valid,
  output logic              dn_ready,
  input  pkt_t              dn_pkt
);
  logic [NBLK-1:0]   b_busy, b_rvalid;
  logic [WORD_W-1:0] b_rdata [NBLK];
  logic [NBLK-1:0]   tx_valid, tx_ready, rx_valid, rx_ready;
  pkt_t              tx_pkt [NBLK];
  pkt_t              rx_pkt [NBLK];
  logic              net_empty;

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    pim_block #(.ROWS(ROWS), .COLS(COLS)) u_blk (
      .clk, .rst_n,
      .blk_id    (BLK_W'(32'(tile_idx) * NBLK + b)),
      .cmd_valid, .cmd,
      .busy      (b_busy[b]),
      .resp_valid(b_rvalid[b]),
      .resp_data (b_rdata[b]),
      .tx_valid  (tx_valid[b]), .tx_ready(tx_ready[b]), .tx_pkt(tx_pkt[b]),
      .rx_valid  (rx_valid[b]), .rx_ready(rx_ready[b]), .rx_pkt(rx_pkt[b])
    );
  end

  htree_net #(.LEVELS(TILE_LEVELS), .BASE_LEVEL(0)) u_net (
    .clk, .rst_n,
    .net_idx      (tile_idx),
    .leaf_up_valid(tx_valid), .leaf_up_ready(tx_ready), .leaf_up_pkt(tx_pkt),
    .leaf_dn_valid(rx_valid), .leaf_dn_ready(rx_ready), .leaf_dn_pkt(rx_pkt),
    .root_up_valid(up_valid), .root_up_ready(up_ready), .root_up_pkt(up_pkt),
    .root_dn_valid(dn_valid), .root_dn_ready(dn_ready), .root_dn_pkt(dn_pkt),
    .empty        (net_empty)
  );

  logic [WORD_W-1:0] rdata_or;
  always_comb begin
    rdata_or = '0;
    for (int b = 0; b < NBLK; b++) if (b_rvalid[b]) rdata_or |= b_rdata[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      empty      <= 1'b1;
      resp_valid <= 1'b0;
      resp_data  <= '0;
    end else begin
      busy       <= |b_busy;
      empty      <= net_empty;
      resp_valid <= |b_rvalid;
      resp_data  <= rdata_or;
    end
  end
endmodule
