// tb_htree_switch: a level-1 switch with node index 2 (blocks 32..47).
// Random packets enter all five ports under random output back-pressure;
// a scoreboard checks that every packet leaves on the port its destination
// selects (child (dst>>2)&3 inside 32..47, parent otherwise), exactly once and
// in order per input/output pair. A lone packet must pass in one cycle, and
// two packets for different outputs must pass in the same cycle.
module tb_htree_switch;
  import wavepim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [BLK_W-1:0] node_idx = 16'd2;
  logic [4:0] in_valid, in_ready, out_valid, out_ready;
  pkt_t in_pkt [5];
  pkt_t out_pkt [5];
  logic empty;

  htree_switch #(.LEVEL(1)) dut (.*);

  function automatic int exp_port(logic [BLK_W-1:0] dst);
    if (dst >= 32 && dst < 48) return int'((dst >> 2) & 3);
    return 4;
  endfunction

  pkt_t exp_q [5][5][$];                // [input][output]
  int sent = 0, recvd = 0;
  int n_to_send [5];
  bit bp_on = 1;
  logic [4:0] in_ready_q;
  int seqn = 0;

  function automatic pkt_t mkpkt(int src, int seq, bit from_parent);
    pkt_t p;
    int d;
    if (from_parent) d = $urandom_range(32, 47);
    else d = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 200) : $urandom_range(32, 47);
    p.dst_block = BLK_W'(d);
    p.row  = ROW_AW'($urandom);
    p.off  = OFF_W'($urandom);
    p.data = {8'(src), 24'(seq)};
    return p;
  endfunction


  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: outputs
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 5; o++) if (out_valid[o] && out_ready[o]) begin
      automatic int src = int'(out_pkt[o].data[31:24]);
      checks++;
      if (src > 4 || exp_q[src][o].size() == 0) begin
        failures++; $display("unexpected packet on port %0d from %0d: %h", o, src, out_pkt[o]);
      end else begin
        automatic pkt_t e = exp_q[src][o].pop_front();
        if (e !== out_pkt[o]) begin failures++; $display("packet mismatch on port %0d", o); end
      end
      recvd++;
    end
  end

  // input side: record accepted packets, offer a new one
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 5; i++) if (in_valid[i] && in_ready[i]) begin
      exp_q[i][exp_port(in_pkt[i].dst_block)].push_back(in_pkt[i]);
      sent++;
      n_to_send[i]--;
    end
  end
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 5; i++) begin
      if (n_to_send[i] > 0 && (!in_valid[i] || in_ready_q[i])) begin
        if ($urandom_range(0, 3) != 0) begin in_pkt[i] = mkpkt(i, seqn++, i == 4); in_valid[i] = 1; end
        else in_valid[i] = 0;
      end else if (n_to_send[i] <= 0) in_valid[i] = 0;
    end
    for (int o = 0; o < 5; o++) out_ready[o] = bp_on ? ($urandom_range(0, 2) != 0) : 1'b1;
  end
  always @(posedge clk) in_ready_q <= in_valid & in_ready;

  initial begin
    rst_n = 0; in_valid = 0; out_ready = '1;
    for (int i = 0; i < 5; i++) begin in_pkt[i] = '0; n_to_send[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    bp_on = 0;
    @(negedge clk);
    // directed: lone packet from child 0 to block 45 (child 3): one cycle
    in_pkt[0] = mkpkt(0, 0, 0); in_pkt[0].dst_block = 16'd45; in_valid[0] = 1; n_to_send[0] = 1;
    @(posedge clk); #1;
    in_valid[0] = 0;
    checks++; if (!(out_valid[3] && out_pkt[3].dst_block == 16'd45)) begin failures++; $display("one-cycle hop failed"); end
    // directed: child 1 -> child 2 and parent -> child 0 in the same cycle
    @(negedge clk);
    in_pkt[1] = mkpkt(1, 1, 0); in_pkt[1].dst_block = 16'd40; in_valid[1] = 1; n_to_send[1] = 1;
    in_pkt[4] = mkpkt(4, 1, 1); in_pkt[4].dst_block = 16'd33; in_valid[4] = 1; n_to_send[4] = 1;
    @(posedge clk); #1;
    in_valid[1] = 0; in_valid[4] = 0;
    checks++; if (!(out_valid[2] && out_valid[0])) begin failures++; $display("parallel transfer failed"); end
    repeat (4) @(negedge clk);
    // random traffic
    bp_on = 1;
    for (int i = 0; i < 5; i++) n_to_send[i] = 300;
    while (n_to_send.sum() > 0) @(negedge clk);
    bp_on = 0;
    repeat (20) @(negedge clk);
    checks++; if (sent != recvd) begin failures++; $display("sent %0d received %0d", sent, recvd); end
    checks++; if (!empty) begin failures++; $display("not empty at end"); end
    checks++; if (sent < 1500) begin failures++; $display("too few packets %0d", sent); end
    $display("packets %0d", sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
