// crossbar_array: the bit storage of one memory block (memristor crossbar,
// sense amplifiers and drivers), described by its digital behaviour.
//
// The array holds ROWS x COLS cells. Computation in the block is row-parallel:
// one operation touches the same columns in every row at once. The storage is
// therefore kept column by column: each entry of `mem` is one column, ROWS bits
// tall, so a single access reads or writes a whole column across all rows.
//
// Ports: two synchronous read ports (ra/qa, rb/qb, data one cycle after the
// address) and one write port whose per-row mask `wmask` plays the part of the
// row drivers: only the rows whose mask bit is set are written. A read of the
// column being written in the same cycle returns the old contents.
//
// The 1024 x 1024 size follows the paper; the column-wise organisation and
// the two read ports are this design's choices.
module crossbar_array #(
  parameter int ROWS = 1024,
  parameter int COLS = 1024
) (
  input  logic                      clk,
  input  logic [$clog2(COLS)-1:0]   ra,
  input  logic [$clog2(COLS)-1:0]   rb,
  output logic [ROWS-1:0]           qa,
  output logic [ROWS-1:0]           qb,
  input  logic                      we,
  input  logic [$clog2(COLS)-1:0]   wa,
  input  logic [ROWS-1:0]           wmask,
  input  logic [ROWS-1:0]           wdata
);
  logic [ROWS-1:0] mem [COLS];

  always_ff @(posedge clk) begin
    qa <= mem[ra];
    qb <= mem[rb];
    if (we) mem[wa] <= (mem[wa] & ~wmask) | (wdata & wmask);
  end
endmodule
