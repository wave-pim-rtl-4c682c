// tb_pim_tile: a 16-block tile (two H-tree levels) of 64 x 64 blocks, tile
// index 1 (blocks 16..31), driven on its command bus and its top H-tree port.
//   - WRITE/READ each block by id; the registered response comes from the
//     addressed block only
//   - broadcast WRITE and NOR reach every block
//   - relative SEND from all blocks at once: every block's word lands in
//     block id+3 when that id is inside the tile, and leaves through the top
//     port otherwise
//   - a packet entering from the top port is written into its block
//   - busy and empty drop once everything has drained
module tb_pim_tile;
  import wavepim_pkg::*;
  localparam int ROWS = 64, COLS = 64, TL = 2, NB = 16, BASE = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, cmd_valid, busy, empty, resp_valid, up_valid, up_ready, dn_valid, dn_ready;
  blk_cmd_t cmd;
  logic [WORD_W-1:0] resp_data;
  pkt_t up_pkt, dn_pkt;

  pim_tile #(.ROWS(ROWS), .COLS(COLS), .TILE_LEVELS(TL)) dut (
    .clk, .rst_n, .tile_idx(16'd1), .cmd_valid, .cmd, .busy, .empty, .resp_valid, .resp_data,
    .up_valid, .up_ready, .up_pkt, .dn_valid, .dn_ready, .dn_pkt);

  logic [31:0] ref_w [NB][ROWS][2];
  pkt_t upq [$];
  logic [31:0] last_resp;
  int nresp = 0;

  always @(posedge clk) begin
    if (rst_n && up_valid && up_ready) upq.push_back(up_pkt);
    if (rst_n && resp_valid) begin last_resp = resp_data; nresp++; end
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic issue(blk_cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    repeat (3) @(negedge clk);
    while (busy || !empty) @(negedge clk);
    @(negedge clk);             // the registered response may land now
  endtask

  task automatic wr(int b, bit bc, int row, int off, logic [31:0] d);
    blk_cmd_t c = '0;
    c.op = BC_WRITE; c.bcast = bc; c.block = BLK_W'(BASE + b);
    c.row_lo = ROW_AW'(row); c.row_hi = ROW_AW'(row); c.off = OFF_W'(off); c.data = d;
    issue(c);
    for (int k = 0; k < NB; k++) if (bc || k == b) ref_w[k][row][off] = d;
  endtask

  task automatic rd_check(int b, int row, int off);
    blk_cmd_t c = '0;
    int n0 = nresp;
    c.op = BC_READ; c.block = BLK_W'(BASE + b); c.row_lo = ROW_AW'(row); c.off = OFF_W'(off);
    issue(c);
    check("one response", 64'(nresp - n0), 64'd1);
    check($sformatf("read blk %0d row %0d off %0d", b, row, off), 64'(last_resp), 64'(ref_w[b][row][off]));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_cmd_t c;
    rst_n = 0; cmd_valid = 0; cmd = '0; up_ready = 1; dn_valid = 0; dn_pkt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) for (int r = 0; r < 4; r++) begin
      wr(b, 0, r, 0, $urandom);
      wr(b, 0, r, 1, $urandom);
    end
    for (int b = 0; b < NB; b++) rd_check(b, b % 4, b % 2);
    // broadcast write to row 2 word 1 of every block
    wr(0, 1, 2, 1, 32'h5A5A_0F0F);
    for (int b = 0; b < NB; b += 5) rd_check(b, 2, 1);
    // broadcast NOR: column 0 = NOR(column 32, column 33) in rows 0..3
    c = '0; c.op = BC_NOR; c.bcast = 1; c.ca = 10'd32; c.cb = 10'd33; c.cd = 10'd0; c.row_hi = 10'd3;
    issue(c);
    for (int b = 0; b < NB; b++) for (int r = 0; r < 4; r++)
      ref_w[b][r][0][0] = ~(ref_w[b][r][1][0] | ref_w[b][r][1][1]);
    for (int b = 0; b < NB; b++) rd_check(b, b % 4, 0);
    // every block sends row 1 word 0 to block id+3, word 1
    c = '0; c.op = BC_SEND; c.bcast = 1; c.rel = 1; c.dst_block = 16'd3; c.row_lo = 10'd1;
    c.off = 5'd0; c.dst_off = 5'd1;
    begin
      logic [31:0] snap [NB];
      for (int b = 0; b < NB; b++) snap[b] = ref_w[b][1][0];
      issue(c);
      for (int b = 0; b + 3 < NB; b++) ref_w[b + 3][1][1] = snap[b];
      check("packets leaving the tile", 64'(upq.size()), 64'd3);
      for (int k = 0; k < upq.size(); k++) begin
        check("leaving dst", 64'(upq[k].dst_block >= BASE + NB), 64'd1);
        check("leaving data", 64'(upq[k].data), 64'(snap[int'(upq[k].dst_block) - BASE - 3]));
      end
    end
    for (int b = 0; b < NB; b++) rd_check(b, 1, 1);
    // a packet from above into block 9
    @(negedge clk);
    dn_pkt.dst_block = BLK_W'(BASE + 9); dn_pkt.row = 10'd3; dn_pkt.off = 5'd0; dn_pkt.data = 32'hDEAD_BEEF;
    dn_valid = 1;
    while (!dn_ready) @(negedge clk);
    @(negedge clk); dn_valid = 0;
    repeat (3) @(negedge clk);
    while (busy || !empty) @(negedge clk);
    ref_w[9][3][0] = 32'hDEAD_BEEF;
    rd_check(9, 3, 0);
    rd_check(9, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
