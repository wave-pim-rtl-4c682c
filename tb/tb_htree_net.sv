// tb_htree_net: a two-level H-tree over 16 leaves (four level-0 switches and
// one level-1 switch), the 16-block tile drawn as the paper's example.
//   - block 0 -> block 5 crosses S0, S1, S0: three cycles
//   - 0 -> 2 and 5 -> 7 at the same time arrive in the same cycle
//   - random all-to-all traffic, some of it leaving through the root and some
//     entering from the root, under random back-pressure: every packet must
//     reach its leaf (or the root) exactly once, in order per source/sink pair
module tb_htree_net;
  import wavepim_pkg::*;
  localparam int L = 2, N = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [N-1:0] lu_v, lu_r, ld_v, ld_r;
  pkt_t lu_p [N];
  pkt_t ld_p [N];
  logic ru_v, ru_r, rd_v, rd_r, empty;
  pkt_t ru_p, rd_p;

  htree_net #(.LEVELS(L), .BASE_LEVEL(0)) dut (
    .clk, .rst_n, .net_idx(16'd0),
    .leaf_up_valid(lu_v), .leaf_up_ready(lu_r), .leaf_up_pkt(lu_p),
    .leaf_dn_valid(ld_v), .leaf_dn_ready(ld_r), .leaf_dn_pkt(ld_p),
    .root_up_valid(ru_v), .root_up_ready(ru_r), .root_up_pkt(ru_p),
    .root_dn_valid(rd_v), .root_dn_ready(rd_r), .root_dn_pkt(rd_p),
    .empty
  );

  // source N is the root; sink N is the root
  pkt_t exp_q [N+1][N+1][$];
  int sent = 0, recvd = 0, seqn = 0, to_send = 0;
  bit bp_on = 0;
  bit rand_on = 0;
  logic [N:0] acc_q;
  int arrive [N+1];

  function automatic pkt_t mkpkt(int src);
    pkt_t p;
    int d = (src == N) ? $urandom_range(0, N-1)
          : (($urandom_range(0, 5) == 0) ? $urandom_range(N, 60) : $urandom_range(0, N-1));
    p.dst_block = BLK_W'(d);
    p.row = ROW_AW'($urandom); p.off = OFF_W'($urandom);
    p.data = {8'(src), 24'(seqn++)};
    return p;
  endfunction

  function automatic int sink_of(logic [BLK_W-1:0] d);
    return (d < N) ? int'(d) : N;
  endfunction

  task automatic got(int o, pkt_t p);
    automatic int src = int'(p.data[31:24]);
    checks++;
    recvd++;
    arrive[o] = seqn;
    if (src > N || exp_q[src][o].size() == 0) begin
      failures++; $display("unexpected packet at %0d: %h", o, p);
    end else begin
      automatic pkt_t e = exp_q[src][o].pop_front();
      if (e !== p) begin failures++; $display("order/content error at %0d", o); end
      if (o < N && p.dst_block != BLK_W'(o)) begin failures++; $display("wrong leaf %0d", o); end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int o = 0; o < N; o++) if (ld_v[o] && ld_r[o]) begin got(o, ld_p[o]); arrive[o] = cyc; end
      if (ru_v && ru_r) got(N, ru_p);
      for (int i = 0; i < N; i++) if (lu_v[i] && lu_r[i]) begin
        exp_q[i][sink_of(lu_p[i].dst_block)].push_back(lu_p[i]); sent++; to_send--;
      end
      if (rd_v && rd_r) begin exp_q[N][sink_of(rd_p.dst_block)].push_back(rd_p); sent++; to_send--; end
      acc_q <= {rd_v && rd_r, lu_v & lu_r};
    end
  end

  always @(negedge clk) if (rst_n && rand_on && to_send > 0) begin
    for (int i = 0; i <= N; i++) begin
      automatic bit busy_src = (i == N) ? rd_v && !acc_q[N] : lu_v[i] && !acc_q[i];
      if (!busy_src) begin
        automatic bit go = $urandom_range(0, 3) == 0;
        if (i == N) begin rd_v = go; if (go) rd_p = mkpkt(N); end
        else begin lu_v[i] = go; if (go) lu_p[i] = mkpkt(i); end
      end
    end
    for (int o = 0; o < N; o++) ld_r[o] = bp_on ? ($urandom_range(0, 2) != 0) : 1'b1;
    ru_r = bp_on ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic send_now(int s, int d);
    lu_p[s] = mkpkt(s); lu_p[s].dst_block = BLK_W'(d); lu_v[s] = 1;
  endtask

  initial begin
    int t0;
    rst_n = 0; lu_v = 0; ld_r = '1; ru_r = 1; rd_v = 0; rd_p = '0; acc_q = '0;
    for (int i = 0; i < N; i++) lu_p[i] = '0;
    for (int i = 0; i <= N; i++) arrive[i] = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 0 -> 5
    @(negedge clk);
    to_send = 1; send_now(0, 5); t0 = cyc + 1;   // accepted at the next edge
    @(negedge clk); lu_v = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (arrive[5] - t0 != 3) begin failures++; $display("0->5 took %0d cycles", arrive[5] - t0); end
    // 0 -> 2 and 5 -> 7 together
    to_send = 2; send_now(0, 2); send_now(5, 7);
    @(negedge clk); lu_v = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (arrive[2] != arrive[7] || arrive[2] < 0) begin failures++; $display("parallel transfers not simultaneous"); end
    // random traffic
    bp_on = 1;
    rand_on = 1;
    to_send = 3000;
    while (to_send > 0) @(negedge clk);
    lu_v = 0; rd_v = 0;
    bp_on = 0;
    @(negedge clk); ld_r = '1; ru_r = 1;
    repeat (40) @(negedge clk);
    checks++; if (sent != recvd) begin failures++; $display("sent %0d received %0d", sent, recvd); end
    checks++; if (!empty) begin failures++; $display("not empty"); end
    $display("packets %0d", sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
