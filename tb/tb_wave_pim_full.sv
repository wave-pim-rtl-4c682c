// tb_wave_pim_full: a chip built from full-size memory blocks (1024 x 1024
// bits): four tiles of 64 blocks, 256 blocks (32 MB) in all. It runs one short
// program: load operands, broadcast a constant to every block, add
// row-parallel in every block, move a word from the first to the last block
// over all four H-tree levels of this size, and fetch a table entry with a LUT
// instruction. Results are read back through the host port and compared with
// values computed here.
module tb_wave_pim_full;
  import wavepim_pkg::*;
  localparam int NB = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, ins_valid, ins_ready, resp_valid;
  logic [63:0] ins;
  logic [31:0] ins_data, resp_data;
  logic [31:0] resp_q [$];

  wave_pim_top #(.TILE_LEVELS(3), .CHIP_LEVELS(1)) dut (.*);

  always @(posedge clk) if (rst_n && resp_valid) resp_q.push_back(resp_data);

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
  endtask

  task automatic write(bit bc, int b, int off, logic [31:0] d);
    ins_mem_t m = '0;
    m.opcode = OP_WRITE; m.bcast = bc; m.block = BLK_W'(b); m.off = OFF_W'(off);
    send(m, d);
  endtask

  task automatic read_check(int b, int r, int off, logic [31:0] exp);
    ins_mem_t m = '0;
    m.opcode = OP_READ; m.block = BLK_W'(b); m.row = ROW_AW'(r); m.off = OFF_W'(off);
    send(m);
    @(negedge clk);
    check("one response", 64'(resp_q.size()), 64'd1);
    if (resp_q.size() > 0)
      check($sformatf("block %0d row %0d word %0d", b, r, off), 64'(resp_q.pop_front()), 64'(exp));
    resp_q.delete();
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_alu_t a;
    ins_send_t s;
    ins_lut_t l;
    logic [31:0] x [4];
    rst_n = 0; ins_valid = 0; ins = 0; ins_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // operand A per block in word 0 of rows 0..511 (one write per block shown
    // for four blocks), constant B broadcast to all blocks
    setrows(0, 511);
    foreach (x[i]) x[i] = $urandom;
    write(0, 0, 0, x[0]);
    write(0, 100, 0, x[1]);
    write(0, 255, 0, x[2]);
    write(0, 200, 0, x[3]);
    write(1, 0, 1, 32'h0000_1111);
    write(1, 0, 2, 32'h0);
    // word 2 = word 0 + word 1 (16-bit add) in rows 0..511 of every block
    a = '0; a.opcode = OP_ADD; a.width_m1 = 5'd15; a.bcast = 1; a.cd = 10'd64; a.ca = 10'd0; a.cb = 10'd32;
    send(a);
    // block 0 row 7 word 2 -> block 255 row 7 word 3
    s = '0; s.opcode = OP_SEND; s.src = 16'd0; s.dst = 16'd255; s.row = 10'd7;
    s.src_off = 5'd2; s.dst_off = 5'd3;
    send(s);
    // LUT: index in block 100 row 600 word 4 selects entry 40000 of the
    // table that starts in block 180 (block 181, row 226, word 0)
    setrows(600, 600);
    write(0, 100, 4, 32'd40000);
    setrows(226, 226);
    write(0, 181, 0, 32'hC0DE_5EED);
    l = '0; l.opcode = OP_LUT; l.row_id = 26'(100 * 1024 + 600); l.offset_s = 5'd4;
    l.lut_block = 21'd180; l.offset_d = 5'd5;
    send(l);
    for (int i = 0; i < 4; i++) begin
      automatic int b = (i == 0) ? 0 : (i == 1) ? 100 : (i == 2) ? 255 : 200;
      read_check(b, 300, 2, 32'(16'(x[i][15:0] + 16'h1111)));
      read_check(b, 511, 1, 32'h0000_1111);
    end
    read_check(255, 7, 3, 32'(16'(x[0][15:0] + 16'h1111)));
    read_check(100, 600, 5, 32'hC0DE_5EED);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
