// tb_nor_sequencer: executes the NOR stream of the sequencer on a model of a
// 64-row block (each column a 64-bit vector, every NOR applied to all rows)
// and checks, row by row, that the result columns hold A + B mod 2^W for
// random operands and widths 1, 8, 17 and 32. It also checks the number of
// NORs (2 + 9*W), that no NOR writes an operand column or outside the result
// and scratch columns, and that the sequencer holds an op until op_done.
module tb_nor_sequencer;
  import wavepim_pkg::*;
  localparam int COLS = 128, ROWS = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, op_valid, op_done;
  logic [COL_AW-1:0] cd, ca, cb, op_cd, op_ca, op_cb;
  logic [5:0] width;

  nor_sequencer #(.COLS(COLS)) dut (.*);

  logic [ROWS-1:0] col [COLS];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_add(int w, int a0, int b0, int d0);
    longint unsigned av [ROWS], bv [ROWS], ev;
    int nops = 0, bad_wr = 0;
    for (int c = 0; c < COLS; c++) for (int r = 0; r < ROWS; r++) col[c][r] = 1'($urandom);
    for (int r = 0; r < ROWS; r++) begin
      av[r] = 0; bv[r] = 0;
      for (int i = 0; i < w; i++) begin
        av[r][i] = col[a0+i][r];
        bv[r][i] = col[b0+i][r];
      end
    end
    @(negedge clk);
    start = 1; cd = COL_AW'(d0); ca = COL_AW'(a0); cb = COL_AW'(b0); width = 6'(w);
    @(negedge clk);
    start = 0;
    while (busy) begin
      logic [COL_AW-1:0] hold_d;
      if (!op_valid) begin failures++; $display("busy without op"); end
      hold_d = op_cd;
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        if (op_cd != hold_d) begin failures++; $display("op changed before done"); end
      end
      // execute the NOR on every row
      if (!((op_cd >= COL_AW'(d0) && op_cd < COL_AW'(d0 + w)) || op_cd >= COL_AW'(COLS - 9))) bad_wr++;
      col[op_cd] = ~(col[op_ca] | col[op_cb]);
      nops++;
      op_done = 1;
      @(negedge clk);
      op_done = 0;
    end
    checks++;
    if (nops != 2 + 9 * w) begin failures++; $display("width %0d: %0d NORs", w, nops); end
    checks++;
    if (bad_wr != 0) begin failures++; $display("NOR wrote outside result/scratch"); end
    for (int r = 0; r < ROWS; r++) begin
      longint unsigned got = 0;
      ev = (av[r] + bv[r]) & ((64'd1 << w) - 1);
      for (int i = 0; i < w; i++) got[i] = col[d0+i][r];
      checks++;
      if (got != ev) begin
        failures++;
        $display("w=%0d row %0d: %0h + %0h = %0h, expected %0h", w, r, av[r], bv[r], got, ev);
      end
    end
  endtask

  initial begin
    rst_n = 0; start = 0; op_done = 0; cd = 0; ca = 0; cb = 0; width = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_add(8, 0, 8, 16);
    run_add(32, 0, 32, 64);
    run_add(17, 40, 3, 70);
    run_add(1, 5, 6, 7);
    run_add(32, 0, 32, 0);      // result over operand A
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
