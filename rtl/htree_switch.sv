// htree_switch: one node of the H-tree that carries data between memory blocks.
//
// Every node has four children (ports 0-3: memory blocks at level 0, lower
// switches above that) and one parent (port 4). A node at level LEVEL with
// index node_idx covers the 4^(LEVEL+1) blocks node_idx*4^(LEVEL+1) onwards.
// A packet whose destination block lies in that range goes down to child
// (dst >> 2*LEVEL) & 3, any other packet goes up to the parent. Transfers
// that use different ports proceed in the same cycle, so disjoint subtrees
// exchange data in parallel.
//
// Each input has a two-entry FIFO whose ready is registered (not full), so
// ready never depends combinationally on the next node. Each output picks one
// of the inputs that want it, round-robin, and forwards the head of that FIFO
// directly: one cycle per hop, one packet per port per cycle. `empty` is high
// when no packet is stored in the node.
//
// The four-child tree and the level structure (S_0 nodes over blocks, S_1
// over S_0, ...) follow the paper. The paper sets the path hop by hop with
// memcpy instructions; here the path is taken from the destination address
// carried in the packet, and the buffering and arbitration are this design's
// own.
module htree_switch
  import wavepim_pkg::*;
#(
  parameter int LEVEL = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BLK_W-1:0] node_idx,
  input  logic [4:0]       in_valid,
  output logic [4:0]       in_ready,
  input  pkt_t             in_pkt  [5],
  output logic [4:0]       out_valid,
  input  logic [4:0]       out_ready,
  output pkt_t             out_pkt [5],
  output logic             empty
);
  localparam int NP = 5;

  pkt_t       fifo [NP][2];
  logic [1:0] cnt  [NP];
  logic [NP-1:0] head_valid;
  logic [2:0] want [NP];                 // output wanted by each input head
  logic [2:0] rr   [NP];                 // round-robin pointer of each output
  logic [NP-1:0] pop;
  logic [2:0] sel  [NP];                 // input granted by each output
  logic [NP-1:0] gnt_v;

  function automatic logic [2:0] route(logic [BLK_W-1:0] dst, logic [BLK_W-1:0] idx);
    logic [31:0] upper;
    upper = 32'(dst) >> (2 * (LEVEL + 1));
    if (upper == 32'(idx)) return 3'((32'(dst) >> (2 * LEVEL)) & 32'd3);
    return 3'd4;
  endfunction

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      head_valid[i] = cnt[i] != 2'd0;
      want[i]       = route(fifo[i][0].dst_block, node_idx);
    end
  end

  // arbitration: output o serves the first requesting input at or after rr[o]
  always_comb begin
    pop = '0;
    for (int o = 0; o < NP; o++) begin
      gnt_v[o] = 1'b0;
      sel[o]   = '0;
      for (int k = 0; k < NP; k++) begin
        automatic int i = (int'(rr[o]) + k) % NP;
        if (!gnt_v[o] && head_valid[i] && want[i] == 3'(o)) begin
          gnt_v[o] = 1'b1;
          sel[o]   = 3'(i);
        end
      end
      out_valid[o] = gnt_v[o];
      out_pkt[o]   = fifo[sel[o]][0];
      if (gnt_v[o] && out_ready[o]) pop[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NP; i++) begin
        cnt[i]     <= '0;
        rr[i]      <= '0;
        fifo[i][0] <= '0;
        fifo[i][1] <= '0;
      end
      in_ready <= '1;
    end else begin
      for (int i = 0; i < NP; i++) begin
        automatic logic push = in_valid[i] && in_ready[i];
        automatic logic [1:0] n = cnt[i] + 2'(push) - 2'(pop[i]);
        if (pop[i]) fifo[i][0] <= fifo[i][1];
        if (push) begin
          if (cnt[i] == 2'd0 || (cnt[i] == 2'd1 && pop[i])) fifo[i][0] <= in_pkt[i];
          else fifo[i][1] <= in_pkt[i];
        end
        cnt[i]      <= n;
        in_ready[i] <= n != 2'd2;
      end
      for (int o = 0; o < NP; o++)
        if (gnt_v[o] && out_ready[o]) rr[o] <= (sel[o] == 3'd4) ? 3'd0 : sel[o] + 3'd1;
    end
  end

  assign empty = head_valid == '0;

  // a packet that came down from the parent must never be sent back up
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(head_valid[4] && want[4] == 3'd4))
    else $error("htree_switch: packet from parent routed back up");
endmodule
