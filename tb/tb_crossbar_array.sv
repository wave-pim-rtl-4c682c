// tb_crossbar_array: random masked column writes against a reference array,
// checking both read ports and their one-cycle read latency and that a read
// in the same cycle as a write returns the old column.
module tb_crossbar_array;
  localparam int ROWS = 1024, COLS = 1024, CB = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [CB-1:0] ra, rb, wa;
  logic [ROWS-1:0] qa, qb, wmask, wdata;
  logic we;
  logic [ROWS-1:0] ref_mem [COLS];

  crossbar_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  function automatic logic [ROWS-1:0] rnd();
    logic [ROWS-1:0] v;
    for (int i = 0; i < ROWS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; wa = 0; wmask = 0; wdata = 0;
    // fill 64 columns completely
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      we = 1; wa = CB'(c); wmask = '1; wdata = rnd(); ref_mem[c] = wdata;
    end
    // random masked writes mixed with reads
    for (int n = 0; n < 400; n++) begin
      logic [ROWS-1:0] old_a;
      @(negedge clk);
      we = 1; wa = CB'($urandom_range(0, 63)); wmask = rnd(); wdata = rnd();
      ra = CB'($urandom_range(0, 63)); rb = wa;
      old_a = ref_mem[ra];
      @(posedge clk);
      #1;
      checks++;
      if (qa !== old_a) begin failures++; $display("read a mismatch col %0d", ra); end
      checks++;
      if (qb !== ref_mem[wa]) begin failures++; $display("read-during-write not old data"); end
      ref_mem[wa] = (ref_mem[wa] & ~wmask) | (wdata & wmask);
    end
    @(negedge clk);
    we = 0;
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      ra = CB'(c); rb = CB'(63 - c);
      @(posedge clk); #1;
      checks += 2;
      if (qa !== ref_mem[c]) begin failures++; $display("final col %0d", c); end
      if (qb !== ref_mem[63 - c]) begin failures++; $display("final b col %0d", 63 - c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
