// tb_lut_unit: runs random LUT instructions at the default 1024 x 1024 block
// size against a word-addressed memory model that answers each request after
// a random delay. For every instruction it checks the three steps and their
// addresses worked out from the paper's formulas:
//   R1 block = Row ID / 1024, row = Row ID mod 1024, word = Offset_S
//   R2 block = LUT Block ID + index / 32768, row = (index / 32) mod 1024,
//      word = index mod 32
//   W1 block/row as R1, word = Offset_D, data = the entry read by R2
// and that busy covers exactly the three steps.
module tb_lut_unit;
  import wavepim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, req_valid, req_we, req_done;
  ins_lut_t ins;
  logic [BLK_W-1:0] req_block;
  logic [ROW_AW-1:0] req_row;
  logic [OFF_W-1:0] req_off;
  logic [WORD_W-1:0] req_wdata, req_rdata;

  lut_unit dut (.*);

  logic [31:0] mem [longint];
  function automatic longint key(longint b, longint r, longint o);
    return (b << 15) | (r << 5) | o;
  endfunction
  function automatic logic [31:0] rd(longint k);
    if (!mem.exists(k)) mem[k] = $urandom;
    return mem[k];
  endfunction

  task automatic expect_req(string what, bit we, longint b, longint r, longint o);
    checks++;
    if (!(req_valid && req_we == we && req_block == BLK_W'(b) && req_row == ROW_AW'(r) && req_off == OFF_W'(o))) begin
      failures++;
      $display("%s: got v=%0d we=%0d blk=%0d row=%0d off=%0d, expected we=%0d blk=%0d row=%0d off=%0d",
               what, req_valid, req_we, req_block, req_row, req_off, we, b, r, o);
    end
  endtask

  task automatic serve(output logic [31:0] d);
    repeat ($urandom_range(0, 4)) @(negedge clk);
    d = req_we ? req_wdata : rd(key(req_block, req_row, req_off));
    if (req_we) mem[key(req_block, req_row, req_off)] = req_wdata;
    req_rdata = d; req_done = 1;
    @(negedge clk);
    req_done = 0; req_rdata = $urandom;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] idx, entry, d;
    longint rb, rr;
    rst_n = 0; start = 0; ins = '0; req_done = 0; req_rdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      ins_lut_t li;
      li.opcode = OP_LUT;
      li.row_id = 26'($urandom_range(0, 16383 * 4));
      li.offset_s = 5'($urandom); li.offset_d = 5'($urandom);
      li.lut_block = 21'($urandom_range(0, 9000));
      idx = (n % 3 == 0) ? $urandom_range(0, 32767) : $urandom_range(0, 100000);
      rb = longint'(li.row_id) >> 10; rr = longint'(li.row_id) & 1023;
      mem[key(rb, rr, li.offset_s)] = idx;
      entry = rd(key(longint'(li.lut_block) + (idx >> 15), (idx >> 5) & 1023, idx & 31));
      @(negedge clk);
      ins = li; start = 1;
      @(negedge clk);
      start = 0;
      expect_req("R1", 0, rb, rr, li.offset_s);
      serve(d);
      expect_req("R2", 0, longint'(li.lut_block) + (idx >> 15), (idx >> 5) & 1023, idx & 31);
      serve(d);
      expect_req("W1", 1, rb, rr, li.offset_d);
      checks++;
      if (req_wdata != entry) begin failures++; $display("W1 data %h, expected %h", req_wdata, entry); end
      serve(d);
      checks++;
      if (busy) begin failures++; $display("busy after W1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
