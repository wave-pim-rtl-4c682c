// tb_central_controller: the controller against a model of the block array.
// The model records every block command, keeps busy high for a random time
// (seen two cycles after the command, as through the tiles' registers),
// holds net_empty low for a while after a SEND, and answers READs with a
// word computed from the address. The testbench checks
//   - the command each instruction produces (fields, row range, data)
//   - READ results returned to the host
//   - ADD of width W produces 2 + 9*W NORs on the chosen blocks and rows
//   - LUT produces READ, READ, WRITE with the addresses of the paper's
//     Algorithm 1 and writes the entry it read
//   - no command is issued while blocks are busy or packets are in flight
module tb_central_controller;
  import wavepim_pkg::*;
  localparam int ROWS = 1024, COLS = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, ins_valid, ins_ready, resp_valid, cmd_valid, blk_busy, net_empty, blk_resp_valid;
  logic [63:0] ins;
  logic [31:0] ins_data, resp_data, blk_resp_data;
  blk_cmd_t cmd;

  central_controller #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  blk_cmd_t cmds [$];
  int busy_left = 0, pipe = 0, empty_left = 0, violations = 0;
  blk_cmd_t pend;
  logic [31:0] host_resp [$];

  function automatic logic [31:0] word_at(logic [BLK_W-1:0] b, logic [ROW_AW-1:0] r, logic [OFF_W-1:0] o);
    return {b[11:0], r, o, 5'h15} ^ 32'h9E37_79B9;
  endfunction

  // block-array model
  always @(posedge clk) begin
    blk_resp_valid <= 0;
    if (!rst_n) begin
      blk_busy <= 0; net_empty <= 1; busy_left = 0; pipe = 0; empty_left = 0;
    end else begin
      if (cmd_valid) begin
        if (busy_left > 0 || pipe > 0 || !net_empty || blk_busy) violations++;
        cmds.push_back(cmd);
        pend = cmd;
        pipe = 2;
      end else if (pipe > 0) begin
        pipe--;
        if (pipe == 0) busy_left = $urandom_range(1, 12);
      end
      blk_busy <= busy_left > 0;
      if (busy_left > 0) begin
        busy_left--;
        if (busy_left == 0) begin
          if (pend.op == BC_READ) begin
            blk_resp_valid <= 1;
            blk_resp_data <= word_at(pend.block, pend.row_lo, pend.off);
          end
          if (pend.op == BC_SEND) empty_left = $urandom_range(1, 6);
        end
      end
      if (empty_left > 0) empty_left--;
      net_empty <= empty_left == 0 && !(busy_left == 0 && pend.op == BC_SEND && pipe == 0 && empty_left > 0);
      if (resp_valid) host_resp.push_back(resp_data);
    end
  end

  task automatic send(logic [63:0] i, logic [31:0] d = 0);
    @(negedge clk);
    while (!ins_ready) @(negedge clk);
    ins = i; ins_data = d; ins_valid = 1;
    @(negedge clk);
    ins_valid = 0;
    while (!ins_ready) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ins_setrows_t sr;
    ins_alu_t al;
    ins_mem_t me;
    ins_send_t se;
    ins_lut_t lu;
    blk_cmd_t c;
    rst_n = 0; ins_valid = 0; ins = 0; ins_data = 0; blk_resp_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // SETROWS then NOR
    sr = '0; sr.opcode = OP_SETROWS; sr.row_lo = 10'd0; sr.row_hi = 10'd511;
    send(sr);
    check("SETROWS issues nothing", 64'(cmds.size()), 64'd0);
    al = '0; al.opcode = OP_NOR; al.bcast = 1; al.cd = 10'd7; al.ca = 10'd100; al.cb = 10'd200;
    send(al);
    check("NOR one command", 64'(cmds.size()), 64'd1);
    c = cmds.pop_front();
    check("NOR op", 64'(c.op), 64'(BC_NOR));
    check("NOR cols", {c.cd, c.ca, c.cb}, {10'd7, 10'd100, 10'd200});
    check("NOR rows", {c.row_lo, c.row_hi}, {10'd0, 10'd511});
    check("NOR bcast", 64'(c.bcast), 64'd1);
    // WRITE
    me = '0; me.opcode = OP_WRITE; me.block = 16'd1234; me.off = 5'd9;
    send(me, 32'hABCD_0123);
    c = cmds.pop_front();
    check("WRITE op", 64'(c.op), 64'(BC_WRITE));
    check("WRITE block/off/data", {c.block, c.off, c.data}, {16'd1234, 5'd9, 32'hABCD_0123});
    check("WRITE rows", {c.row_lo, c.row_hi}, {10'd0, 10'd511});
    // READs
    for (int n = 0; n < 20; n++) begin
      me = '0; me.opcode = OP_READ; me.block = 16'($urandom); me.row = 10'($urandom); me.off = 5'($urandom);
      send(me);
      c = cmds.pop_front();
      check("READ op", 64'(c.op), 64'(BC_READ));
      check("READ addr", {c.block, c.row_lo, c.off}, {me.block, me.row, me.off});
      check("READ to host", 64'(host_resp.size()), 64'd1);
      if (host_resp.size() > 0) check("READ data", 64'(host_resp.pop_front()), 64'(word_at(me.block, me.row, me.off)));
    end
    // SEND
    se = '0; se.opcode = OP_SEND; se.bcast = 1; se.rel = 1; se.dst = 16'hFFF0; se.row = 10'd77;
    se.src_off = 5'd3; se.dst_off = 5'd4;
    send(se);
    c = cmds.pop_front();
    check("SEND op", 64'(c.op), 64'(BC_SEND));
    check("SEND fields", {c.bcast, c.rel, c.dst_block, c.row_lo, c.off, c.dst_off},
          {1'b1, 1'b1, 16'hFFF0, 10'd77, 5'd3, 5'd4});
    // ADD, width 8 and 32
    for (int k = 0; k < 2; k++) begin
      automatic int w = k ? 32 : 8;
      automatic int nor_ok = 0;
      al = '0; al.opcode = OP_ADD; al.width_m1 = 5'(w - 1); al.bcast = 0; al.block = 16'd42;
      al.cd = 10'd64; al.ca = 10'd0; al.cb = 10'd32;
      send(al);
      check("ADD NOR count", 64'(cmds.size()), 64'(2 + 9 * w));
      while (cmds.size() > 0) begin
        c = cmds.pop_front();
        if (c.op == BC_NOR && c.block == 16'd42 && !c.bcast && c.row_hi == 10'd511) nor_ok++;
      end
      check("ADD NORs on block 42, rows 0..511", 64'(nor_ok), 64'(2 + 9 * w));
    end
    // LUT
    for (int n = 0; n < 20; n++) begin
      logic [31:0] idx, entry;
      lu.opcode = OP_LUT; lu.row_id = 26'($urandom_range(0, 1 << 24)); lu.offset_s = 5'($urandom);
      lu.offset_d = 5'($urandom); lu.lut_block = 21'($urandom_range(0, 16000));
      send(lu);
      check("LUT three commands", 64'(cmds.size()), 64'd3);
      if (cmds.size() == 3) begin
        c = cmds.pop_front();
        check("R1", {c.op, c.block, c.row_lo, c.off}, {BC_READ, 16'(lu.row_id >> 10), 10'(lu.row_id), lu.offset_s});
        idx = word_at(c.block, c.row_lo, c.off);
        c = cmds.pop_front();
        check("R2", {c.op, c.block, c.row_lo, c.off},
              {BC_READ, 16'(32'(lu.lut_block) + (idx >> 15)), 10'(idx >> 5), 5'(idx)});
        entry = word_at(c.block, c.row_lo, c.off);
        c = cmds.pop_front();
        check("W1", {c.op, c.block, c.row_lo, c.row_hi, c.off, c.data},
              {BC_WRITE, 16'(lu.row_id >> 10), 10'(lu.row_id), 10'(lu.row_id), lu.offset_d, entry});
      end
      cmds.delete();
    end
    check("no host response except READs", 64'(host_resp.size()), 64'd0);
    check("issue rule violations", 64'(violations), 64'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
