// tb_wave_pim_top: end-to-end test of a small chip, 4 tiles of 4 blocks
// (16 blocks of 64 rows x 128 columns), through the host instruction port
// only. It runs a miniature version of one step of a dG solver mapped on the
// chip: load each element's values row by row, broadcast a constant to all
// element blocks, add row-parallel in every block in a restricted row range,
// exchange words with a neighbouring element over the H-tree, and fetch a
// material value through a look-up table. A model of the whole chip memory
// predicts every word, and all words are read back at the end.
//
// Mechanisms counted (each must happen at least once): broadcast WRITE,
// row-restricted ADD (NOR sequence), packets crossing the chip-level tree
// between tiles, a packet waiting at a block that is not yet ready for it,
// a packet dropped above the root (destination past the last block), and a
// LUT entry that lies in the block after the LUT block.
module tb_wave_pim_top;
  import wavepim_pkg::*;
  localparam int ROWS = 64, COLS = 128, TL = 1, CL = 1;
  localparam int NT = 4 ** CL, NBT = 4 ** TL, NB = NT * NBT, WPR = COLS / 32;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, ins_valid, ins_ready, resp_valid;
  logic [63:0] ins;
  logic [31:0] ins_data, resp_data;

  wave_pim_top #(.ROWS(ROWS), .COLS(COLS), .TILE_LEVELS(TL), .CHIP_LEVELS(CL)) dut (.*);

  logic [31:0] mem [NB][ROWS][WPR];     // reference, word granular
  logic [31:0] resp_q [$];
  logic [ROW_AW-1:0] cur_lo = 0, cur_hi = ROWS - 1;
  int n_bcast = 0, n_add_rows = 0, n_cross = 0, n_stall = 0, n_drop = 0, n_lut_next = 0;

  always @(posedge clk) if (rst_n && resp_valid) resp_q.push_back(resp_data);

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    for (int t = 0; t < NT; t++) if (dut.up_valid[t] && dut.up_ready[t]) n_cross++;
    if (dut.root_up_valid) n_drop++;
  end
  for (genvar t = 0; t < NT; t++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      for (int b = 0; b < NBT; b++)
        if (dut.g_tile[t].u_tile.rx_valid[b] && !dut.g_tile[t].u_tile.rx_ready[b]) n_stall++;
    end
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic send(logic [63:0] i, logic [31:0] d = 0);
    @(negedge clk);
    while (!ins_ready) @(negedge clk);
    ins = i; ins_data = d; ins_valid = 1;
    @(negedge clk);
    ins_valid = 0;
    while (!ins_ready) @(negedge clk);
  endtask

  task automatic setrows(int lo, int hi);
    ins_setrows_t s = '0;
    s.opcode = OP_SETROWS; s.row_lo = ROW_AW'(lo); s.row_hi = ROW_AW'(hi);
    send(s);
    cur_lo = ROW_AW'(lo); cur_hi = ROW_AW'(hi);
  endtask

  task automatic write(bit bc, int b, int off, logic [31:0] d);
    ins_mem_t m = '0;
    m.opcode = OP_WRITE; m.bcast = bc; m.block = BLK_W'(b); m.off = OFF_W'(off);
    send(m, d);
    for (int k = 0; k < NB; k++) if (bc || k == b)
      for (int r = int'(cur_lo); r <= int'(cur_hi); r++) mem[k][r][off] = d;
  endtask

  task automatic read_check(int b, int r, int off);
    ins_mem_t m = '0;
    m.opcode = OP_READ; m.block = BLK_W'(b); m.row = ROW_AW'(r); m.off = OFF_W'(off);
    send(m);
    @(negedge clk);
    check("one response", 64'(resp_q.size()), 64'd1);
    if (resp_q.size() > 0)
      check($sformatf("block %0d row %0d word %0d", b, r, off), 64'(resp_q.pop_front()), 64'(mem[b][r][off]));
    resp_q.delete();
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_alu_t a;
    ins_send_t s;
    ins_lut_t l;
    int t0, add_cycles;
    rst_n = 0; ins_valid = 0; ins = 0; ins_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. load words 0 and 1 of rows 0..15 in every block
    for (int r = 0; r < 16; r++) begin
      setrows(r, r);
      for (int b = 0; b < NB; b++) begin
        write(0, b, 0, $urandom);
        write(0, b, 1, $urandom);
        write(0, b, 3, 32'(b * 1000 + r));
      end
    end
    // 2. broadcast a constant into word 2 of rows 0..15 of all blocks
    setrows(0, 15);
    write(1, 0, 2, 32'h0001_0203);
    n_bcast++;
    // 3. word 1 = word 0 + word 2 in rows 0..7 of every block
    setrows(0, 7);
    a = '0; a.opcode = OP_ADD; a.width_m1 = 5'd31; a.bcast = 1; a.cd = 10'd32; a.ca = 10'd0; a.cb = 10'd64;
    t0 = $time;
    send(a);
    add_cycles = ($time - t0) / 10;
    for (int b = 0; b < NB; b++) for (int r = 0; r <= 7; r++) mem[b][r][1] = mem[b][r][0] + mem[b][r][2];
    n_add_rows++;
    // each of the 290 NORs takes at least its issue, settle and 2 block cycles
    check("ADD takes at least 290 NOR steps", 64'(add_cycles >= 290 * 6), 64'd1);
    // scratch columns 119..127 lie in word 3: rows 0..7 of word 3 now undefined
    // 4. every block sends row 3 word 1 to block id+5, word 0 (crosses tiles)
    s = '0; s.opcode = OP_SEND; s.bcast = 1; s.rel = 1; s.dst = 16'd5; s.row = 10'd3;
    s.src_off = 5'd1; s.dst_off = 5'd0;
    begin
      logic [31:0] snap [NB];
      for (int b = 0; b < NB; b++) snap[b] = mem[b][3][1];
      send(s);
      for (int b = 0; b + 5 < NB; b++) mem[b + 5][3][0] = snap[b];
    end
    // 5. block 2 row 5 word 0 = LUT entry; table starts in block 9, index
    //    300 lies in block 10 (256 words per block), row 11, word 0
    setrows(12, 12);
    write(0, 2, 3, 32'd300);       // index word
    setrows(11, 11);
    write(0, 10, 0, 32'hFEED_0042); // table entry
    l = '0; l.opcode = OP_LUT; l.row_id = 26'(2 * ROWS + 12); l.offset_s = 5'd3;
    l.lut_block = 21'd9; l.offset_d = 5'd2;
    send(l);
    mem[2][12][2] = 32'hFEED_0042;
    n_lut_next++;
    // 6. read back rows 0..15, words 0..2 (and word 3 above the scratch rows)
    for (int b = 0; b < NB; b++) for (int r = 0; r < 16; r++) begin
      for (int w = 0; w < 3; w++) read_check(b, r, w);
      if (r >= 8) read_check(b, r, 3);
    end
    $display("mechanisms: broadcast=%0d add=%0d cross_tile=%0d stall=%0d dropped=%0d lut_next_block=%0d",
             n_bcast, n_add_rows, n_cross, n_stall, n_drop, n_lut_next);
    checks++; if (n_cross == 0) begin failures++; $display("no inter-tile packet"); end
    checks++; if (n_stall == 0) begin failures++; $display("no packet ever waited at a block"); end
    checks++; if (n_drop == 0) begin failures++; $display("no packet past the last block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
