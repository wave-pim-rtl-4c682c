// lut_unit: executes one look-up-table (LUT) instruction.
//
// Look-up tables live in ordinary memory blocks; their contents are loaded by
// the host before computing. A LUT instruction (ins_lut_t: opcode, Row ID,
// Offset_S, LUT Block ID, Offset_D) is carried out in three memory steps, each
// on a global bit address `location`:
//   R1  read the 32-bit index at  Row ID * COLS + Offset_S * 32
//   R2  read the 32-bit entry at  LUT Block ID * ROWS * COLS + index * 32
//   W1  write the entry to        Row ID * COLS + Offset_D * 32
// A location splits into block = location / (ROWS*COLS), row =
// (location / COLS) mod ROWS and word offset = (location mod COLS) / 32.
// With the paper's 1024 x 1024 blocks these are exactly its formulas
// (Row Address * 1024, LUT Block ID * 1024 * 1024); an index past the end of
// one block simply continues in the following block.
//
// Interface: `start` with `ins` begins an instruction while `busy` is low.
// Each step is a request (req_valid held, req_we, req_block/row/off,
// req_wdata) that the owner of the memory completes with a one-cycle req_done,
// returning read data on req_rdata. `busy` drops the cycle after W1 is done.
//
// The instruction layout and the three steps follow the paper; the request
// handshake is this design's own.
module lut_unit
  import wavepim_pkg::*;
#(
  parameter int ROWS = 1024,
  parameter int COLS = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  ins_lut_t          ins,
  output logic              busy,
  output logic              req_valid,
  output logic              req_we,
  output logic [BLK_W-1:0]  req_block,
  output logic [ROW_AW-1:0] req_row,
  output logic [OFF_W-1:0]  req_off,
  output logic [WORD_W-1:0] req_wdata,
  input  logic              req_done,
  input  logic [WORD_W-1:0] req_rdata
);
  localparam int CB = $clog2(COLS);
  localparam int RB = $clog2(ROWS);

  typedef enum logic [1:0] {L_IDLE, L_R1, L_R2, L_W1} lstate_e;
  lstate_e    state;
  ins_lut_t   cur;
  logic [WORD_W-1:0] index, entry;
  logic [LOC_W-1:0]  loc;

  always_comb begin
    unique case (state)
      L_R2:    loc = (LOC_W'(cur.lut_block) << (RB + CB)) + (LOC_W'(index) << 5);
      L_W1:    loc = (LOC_W'(cur.row_id) << CB) + (LOC_W'(cur.offset_d) << 5);
      default: loc = (LOC_W'(cur.row_id) << CB) + (LOC_W'(cur.offset_s) << 5);
    endcase
    req_valid = state != L_IDLE;
    req_we    = state == L_W1;
    req_block = BLK_W'(loc >> (RB + CB));
    req_row   = ROW_AW'((loc >> CB) & LOC_W'(ROWS - 1));
    req_off   = OFF_W'((loc & LOC_W'(COLS - 1)) >> 5);
    req_wdata = entry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_IDLE;
      cur   <= '0;
      index <= '0;
      entry <= '0;
    end else begin
      unique case (state)
        L_IDLE: if (start) begin
          cur   <= ins;
          state <= L_R1;
        end
        L_R1: if (req_done) begin
          index <= req_rdata;
          state <= L_R2;
        end
        L_R2: if (req_done) begin
          entry <= req_rdata;
          state <= L_W1;
        end
        L_W1: if (req_done) state <= L_IDLE;
        default: state <= L_IDLE;
      endcase
    end
  end

  assign busy = state != L_IDLE;
endmodule
