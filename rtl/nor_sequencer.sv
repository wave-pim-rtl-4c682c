// nor_sequencer: turns one bit-serial ADD into the NOR micro-operations that a
// memory block can execute.
//
// Operands are stored bit-serially along a row: bit i of operand A is in
// column ca+i, of B in cb+i, and the sum goes to cd+i. Every NOR acts on all
// active rows at once, so one ADD adds a whole column of numbers. The sum is
// built one bit position at a time with a ripple carry, nine NORs per bit:
//   n1 = NOR(a,b)   n2 = NOR(a,n1)   n3 = NOR(b,n1)   t  = NOR(n2,n3) = XNOR(a,b)
//   m1 = NOR(t,c)   m2 = NOR(t,m1)   m3 = NOR(c,m1)   s  = NOR(m2,m3) = a^b^c
//   c' = NOR(n1,m1)                                   (carry out = majority)
// Two NORs before the first bit clear the carry (x = NOR(a0,a0), c = NOR(a0,x)).
// A WIDTH-bit add therefore takes 2 + 9*WIDTH NORs; the result wraps modulo
// 2^WIDTH. The nine scratch columns are the last nine of the block, which the
// program must leave free; the carry alternates between two of them.
//
// Interface: `start` with the column numbers and width while `busy` is low.
// The current NOR is offered on op_valid/op_cd/op_ca/op_cb and held until the
// consumer pulses op_done once it has completed.
//
// The paper computes with sequences of NOR operations in the blocks and has
// the chip's decoder generate these micro sequences; this particular adder
// and the scratch-column choice are this design's own.
module nor_sequencer
  import wavepim_pkg::*;
#(
  parameter int COLS = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [COL_AW-1:0] cd,
  input  logic [COL_AW-1:0] ca,
  input  logic [COL_AW-1:0] cb,
  input  logic [5:0]        width,     // 1..32
  output logic              busy,
  output logic              op_valid,
  output logic [COL_AW-1:0] op_cd,
  output logic [COL_AW-1:0] op_ca,
  output logic [COL_AW-1:0] op_cb,
  input  logic              op_done
);
  localparam logic [COL_AW-1:0] S_N1 = COL_AW'(COLS - 9);
  localparam logic [COL_AW-1:0] S_N2 = COL_AW'(COLS - 8);
  localparam logic [COL_AW-1:0] S_N3 = COL_AW'(COLS - 7);
  localparam logic [COL_AW-1:0] S_T  = COL_AW'(COLS - 6);
  localparam logic [COL_AW-1:0] S_M1 = COL_AW'(COLS - 5);
  localparam logic [COL_AW-1:0] S_M2 = COL_AW'(COLS - 4);
  localparam logic [COL_AW-1:0] S_M3 = COL_AW'(COLS - 3);
  localparam logic [COL_AW-1:0] S_C0 = COL_AW'(COLS - 2);
  localparam logic [COL_AW-1:0] S_C1 = COL_AW'(COLS - 1);

  logic              active, init;
  logic [3:0]        step;             // 0..8 within a bit, 0..1 during init
  logic [5:0]        bitn, nbits;
  logic [COL_AW-1:0] rd, ra_, rb_;

  wire [COL_AW-1:0] a   = ra_ + COL_AW'(bitn);
  wire [COL_AW-1:0] b   = rb_ + COL_AW'(bitn);
  wire [COL_AW-1:0] cin = bitn[0] ? S_C1 : S_C0;
  wire [COL_AW-1:0] cout = bitn[0] ? S_C0 : S_C1;

  always_comb begin
    op_cd = '0; op_ca = '0; op_cb = '0;
    if (init) begin
      op_ca = ra_;
      if (step == 4'd0) begin op_cd = S_N1; op_cb = ra_;  end
      else              begin op_cd = S_C0; op_cb = S_N1; end
    end else begin
      unique case (step)
        4'd0: begin op_cd = S_N1; op_ca = a;    op_cb = b;    end
        4'd1: begin op_cd = S_N2; op_ca = a;    op_cb = S_N1; end
        4'd2: begin op_cd = S_N3; op_ca = b;    op_cb = S_N1; end
        4'd3: begin op_cd = S_T;  op_ca = S_N2; op_cb = S_N3; end
        4'd4: begin op_cd = S_M1; op_ca = S_T;  op_cb = cin;  end
        4'd5: begin op_cd = S_M2; op_ca = S_T;  op_cb = S_M1; end
        4'd6: begin op_cd = S_M3; op_ca = cin;  op_cb = S_M1; end
        4'd7: begin op_cd = rd + COL_AW'(bitn); op_ca = S_M2; op_cb = S_M3; end
        default: begin op_cd = cout; op_ca = S_N1; op_cb = S_M1; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; init <= 1'b0; step <= '0; bitn <= '0; nbits <= '0;
      rd <= '0; ra_ <= '0; rb_ <= '0;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1; init <= 1'b1; step <= '0; bitn <= '0;
        nbits <= width; rd <= cd; ra_ <= ca; rb_ <= cb;
      end
    end else if (op_done) begin
      if (init) begin
        step <= step + 1'b1;
        if (step == 4'd1) begin init <= 1'b0; step <= '0; end
      end else if (step == 4'd8) begin
        step <= '0;
        bitn <= bitn + 1'b1;
        if (bitn + 1'b1 == nbits) active <= 1'b0;
      end else begin
        step <= step + 1'b1;
      end
    end
  end

  assign busy     = active;
  assign op_valid = active;
endmodule
