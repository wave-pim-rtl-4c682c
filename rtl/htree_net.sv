// htree_net: a complete H-tree of htree_switch nodes over 4^LEVELS leaves.
//
// Level 0 switches connect four leaves each, every higher level connects four
// switches of the level below, and the single top switch has a parent port
// brought out as root_*. BASE_LEVEL is the absolute level of the bottom
// switches: a tile's tree starts at level 0 over memory blocks, the chip's
// tree starts at the tile's height and has whole tiles as its leaves. The
// top switch's absolute index is net_idx, which gives every switch its block
// range for routing (see htree_switch).
//
// With LEVELS = 4 a 256-block tile uses 64 + 16 + 4 + 1 = 85 switches, the
// count the paper gives for a 256-block tile. Leaf ports are valid/ready
// streams of pkt_t; leaf_up_* flow from the leaves into the tree and
// leaf_dn_* from the tree to the leaves. `empty` is high when no switch holds
// a packet.
module htree_net
  import wavepim_pkg::*;
#(
  parameter int LEVELS     = 4,
  parameter int BASE_LEVEL = 0,
  localparam int NLEAF     = 4 ** LEVELS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BLK_W-1:0] net_idx,
  // leaves -> tree
  input  logic [NLEAF-1:0] leaf_up_valid,
  output logic [NLEAF-1:0] leaf_up_ready,
  input  pkt_t             leaf_up_pkt [NLEAF],
  // tree -> leaves
  output logic [NLEAF-1:0] leaf_dn_valid,
  input  logic [NLEAF-1:0] leaf_dn_ready,
  output pkt_t             leaf_dn_pkt [NLEAF],
  // top switch <-> its parent
  output logic             root_up_valid,
  input  logic             root_up_ready,
  output pkt_t             root_up_pkt,
  input  logic             root_dn_valid,
  output logic             root_dn_ready,
  input  pkt_t             root_dn_pkt,
  output logic             empty
);
  // nodes are numbered level by level, bottom level first
  function automatic int lvl_base(int l);
    int b = 0;
    for (int k = 0; k < l; k++) b += 4 ** (LEVELS - 1 - k);
    return b;
  endfunction
  localparam int NNODE = lvl_base(LEVELS);

  // per node: the link to its parent (up = node -> parent, dn = parent -> node)
  logic [NNODE-1:0] up_valid, up_ready, dn_valid, dn_ready, node_empty;
  pkt_t             up_pkt [NNODE];
  pkt_t             dn_pkt [NNODE];

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int NL = 4 ** (LEVELS - 1 - l);
    for (genvar j = 0; j < NL; j++) begin : g_node
      localparam int N = lvl_base(l) + j;
      logic [4:0] i_valid, i_ready, o_valid, o_ready;
      pkt_t       i_pkt [5];
      pkt_t       o_pkt [5];

      for (genvar c = 0; c < 4; c++) begin : g_child
        if (l == 0) begin : g_leaf
          assign i_valid[c]                = leaf_up_valid[4*j+c];
          assign leaf_up_ready[4*j+c]      = i_ready[c];
          assign i_pkt[c]                  = leaf_up_pkt[4*j+c];
          assign leaf_dn_valid[4*j+c]      = o_valid[c];
          assign o_ready[c]                = leaf_dn_ready[4*j+c];
          assign leaf_dn_pkt[4*j+c]        = o_pkt[c];
        end else begin : g_sw
          localparam int C = lvl_base(l - 1) + 4*j + c;
          assign i_valid[c]  = up_valid[C];
          assign up_ready[C] = i_ready[c];
          assign i_pkt[c]    = up_pkt[C];
          assign dn_valid[C] = o_valid[c];
          assign o_ready[c]  = dn_ready[C];
          assign dn_pkt[C]   = o_pkt[c];
        end
      end
      // parent side of this node
      assign up_valid[N] = o_valid[4];
      assign o_ready[4]  = up_ready[N];
      assign up_pkt[N]   = o_pkt[4];
      assign i_valid[4]  = dn_valid[N];
      assign dn_ready[N] = i_ready[4];
      assign i_pkt[4]    = dn_pkt[N];

      htree_switch #(.LEVEL(BASE_LEVEL + l)) u_sw (
        .clk, .rst_n,
        .node_idx (BLK_W'(32'(net_idx) * NL + j)),
        .in_valid (i_valid), .in_ready (i_ready), .in_pkt (i_pkt),
        .out_valid(o_valid), .out_ready(o_ready), .out_pkt(o_pkt),
        .empty    (node_empty[N])
      );
    end
  end

  // the top node's parent link is the root port
  assign root_up_valid        = up_valid[NNODE-1];
  assign up_ready[NNODE-1]    = root_up_ready;
  assign root_up_pkt          = up_pkt[NNODE-1];
  assign dn_valid[NNODE-1]    = root_dn_valid;
  assign root_dn_ready        = dn_ready[NNODE-1];
  assign dn_pkt[NNODE-1]      = root_dn_pkt;
  assign empty                = &node_empty;
endmodule
