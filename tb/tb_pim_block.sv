// tb_pim_block: drives one memory block through every command and the H-tree
// ports. A reference model of the bit array (same word layout: bit i of word w
// in column 32w+i) predicts every result.
//   - WRITE broadcast over a row range, READ back in and outside the range
//   - NOR over a row range, including rows that must keep their old value
//   - READ latency (33 cycles + 1 start cycle) and NOR latency (2 + 1)
//   - SEND: packet contents, absolute and relative destination
//   - receive: packet written into its row and offset
module tb_pim_block;
  import wavepim_pkg::*;
  localparam int ROWS = 64, COLS = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, cmd_valid, busy, resp_valid, tx_valid, tx_ready, rx_valid, rx_ready;
  logic [BLK_W-1:0] blk_id;
  blk_cmd_t cmd;
  logic [WORD_W-1:0] resp_data;
  pkt_t tx_pkt, rx_pkt;

  pim_block #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  logic [COLS-1:0] ref_row [ROWS];      // reference, row-major

  function automatic logic [WORD_W-1:0] ref_word(int r, int off);
    return ref_row[r][off*32 +: 32];
  endfunction

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic issue(input blk_cmd_t c, output int cycles);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = '0;
    cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
  endtask

  task automatic do_write(int lo, int hi, int off, logic [31:0] d);
    blk_cmd_t c = '0;
    int cyc;
    c.op = BC_WRITE; c.block = blk_id; c.row_lo = ROW_AW'(lo); c.row_hi = ROW_AW'(hi);
    c.off = OFF_W'(off); c.data = d;
    issue(c, cyc);
    for (int r = lo; r <= hi; r++) ref_row[r][off*32 +: 32] = d;
  endtask

  task automatic do_read(int r, int off, output logic [31:0] d, output int cyc);
    blk_cmd_t c = '0;
    bit got = 0;
    c.op = BC_READ; c.block = blk_id; c.row_lo = ROW_AW'(r); c.off = OFF_W'(off);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = '0;
    cyc = 1;
    while (busy) begin
      if (resp_valid) begin d = resp_data; got = 1; end
      @(negedge clk); cyc++;
    end
    if (resp_valid) begin d = resp_data; got = 1; end
    check("read response seen", 64'(got), 64'd1);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int cyc;
    blk_cmd_t c;
    rst_n = 0; cmd_valid = 0; cmd = '0; blk_id = 16'd5; tx_ready = 0; rx_valid = 0; rx_pkt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill every row with known words
    for (int r = 0; r < ROWS; r++) begin
      do_write(r, r, 0, $urandom);
      do_write(r, r, 1, $urandom);
    end
    // broadcast a constant into rows 8..23, word 1
    do_write(8, 23, 1, 32'hCAFE_F00D);
    for (int r = 4; r < 28; r++) begin
      do_read(r, 1, d, cyc);
      check($sformatf("broadcast row %0d", r), 64'(d), 64'(ref_word(r, 1)));
    end
    check("read latency", 64'(cyc), 64'd35);
    // NOR col 3 = NOR(col 40, col 7) in rows 10..50
    c = '0; c.op = BC_NOR; c.bcast = 1; c.block = 16'd99; c.ca = 10'd40; c.cb = 10'd7; c.cd = 10'd3;
    c.row_lo = 10'd10; c.row_hi = 10'd50;
    issue(c, cyc);
    check("NOR latency", 64'(cyc), 64'd3);
    for (int r = 0; r < ROWS; r++)
      if (r >= 10 && r <= 50) ref_row[r][3] = ~(ref_row[r][40] | ref_row[r][7]);
    for (int r = 0; r < ROWS; r++) begin
      do_read(r, 0, d, cyc);
      check($sformatf("NOR row %0d", r), 64'(d), 64'(ref_word(r, 0)));
    end
    // a command for another block is ignored
    c.bcast = 0; c.block = 16'd6;
    issue(c, cyc);
    check("other block ignored", 64'(cyc), 64'd1);
    // SEND, absolute destination
    c = '0; c.op = BC_SEND; c.block = 16'd5; c.row_lo = 10'd12; c.off = 5'd1;
    c.dst_block = 16'd77; c.dst_off = 5'd0;
    @(negedge clk); cmd = c; cmd_valid = 1; @(negedge clk); cmd_valid = 0;
    while (!tx_valid) @(negedge clk);
    repeat (3) begin check("tx held", 64'(tx_valid), 64'd1); @(negedge clk); end
    check("busy while tx waits", 64'(busy), 64'd1);
    check("tx dst", 64'(tx_pkt.dst_block), 64'd77);
    check("tx row", 64'(tx_pkt.row), 64'd12);
    check("tx off", 64'(tx_pkt.off), 64'd0);
    check("tx data", 64'(tx_pkt.data), 64'(ref_word(12, 1)));
    tx_ready = 1; @(negedge clk); tx_ready = 0;
    check("tx dropped after handshake", 64'(tx_valid), 64'd0);
    // SEND relative: 5 + (-2)
    c.rel = 1; c.dst_block = 16'hFFFE; c.row_lo = 10'd30; c.off = 5'd0;
    tx_ready = 1;
    @(negedge clk); cmd = c; cmd_valid = 1; @(negedge clk); cmd_valid = 0;
    while (!tx_valid) @(negedge clk);
    check("rel dst", 64'(tx_pkt.dst_block), 64'd3);
    check("rel data", 64'(tx_pkt.data), 64'(ref_word(30, 0)));
    @(negedge clk); tx_ready = 0;
    // receive a packet
    rx_pkt.dst_block = 16'd5; rx_pkt.row = 10'd33; rx_pkt.off = 5'd1; rx_pkt.data = 32'h1234_5678;
    rx_valid = 1;
    cyc = 0;
    while (!rx_ready) begin @(negedge clk); cyc++; end
    @(negedge clk); rx_valid = 0;
    check("rx ready within 2 cycles", 64'(cyc <= 2), 64'd1);
    ref_row[33][32 +: 32] = 32'h1234_5678;
    while (busy) @(negedge clk);
    for (int r = 32; r < 35; r++) begin
      do_read(r, 1, d, cyc);
      check($sformatf("rx row %0d", r), 64'(d), 64'(ref_word(r, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
