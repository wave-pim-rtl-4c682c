// pim_block: one Wave-PIM memory block with its local decoder.
//
// The block stores ROWS x COLS bits in a crossbar_array and computes on them
// in place. A 32-bit word sits in one row, bit i of word `off` in column
// off*32+i, so every row of the block holds its own operands and a command
// acts on all rows in the active range at the same time (row-parallel,
// bit-serial processing). The only logic operation is NOR, as in a memristor
// crossbar; any arithmetic is a sequence of NORs issued by the controller.
//
// Commands (blk_cmd_t, one-cycle cmd_valid, accepted when the command is
// broadcast or names this block's blk_id):
//   BC_NOR   col cd = NOR(col ca, col cb) in rows row_lo..row_hi   2 cycles
//   BC_WRITE word `data` at offset `off` into rows row_lo..row_hi  32 cycles
//            (a constant broadcast when the range spans many rows)
//   BC_READ  word (row_lo, off) -> resp_valid/resp_data           33 cycles
//   BC_SEND  word (row_lo, off) -> H-tree packet for block
//            dst_block (or blk_id + dst_block when rel), row_lo, dst_off
// A command starts the cycle after it is accepted, so busy lasts one cycle
// longer than the counts above. Packets arriving on rx are written into their row/offset (32 cycles) while
// no command is running. `busy` is high from the cycle after a command is
// accepted until it is finished, while a packet waits in tx and while a
// received packet is being written. rx_ready is a register, so there is no
// combinational path from the H-tree back into the block.
//
// The block, its row-parallel NOR and the read/buffer/write steps of a
// transfer follow the paper; the command set, its encoding and the cycle
// counts are this design's own.
module pim_block
  import wavepim_pkg::*;
#(
  parameter int ROWS = 1024,
  parameter int COLS = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BLK_W-1:0]  blk_id,
  // command from the central controller
  input  logic              cmd_valid,
  input  blk_cmd_t          cmd,
  output logic              busy,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_data,
  // H-tree port: packets out of the block
  output logic              tx_valid,
  input  logic              tx_ready,
  output pkt_t              tx_pkt,
  // H-tree port: packets into the block
  input  logic              rx_valid,
  output logic              rx_ready,
  input  pkt_t              rx_pkt
);
  localparam int CB = $clog2(COLS);
  localparam int RB = $clog2(ROWS);

  typedef enum logic [2:0] {S_IDLE, S_NOR_WR, S_WRITE, S_READ, S_RX} state_e;
  state_e state;

  blk_cmd_t          cur;        // command being executed
  logic              pend;       // command accepted, not yet started
  blk_cmd_t          pend_cmd;
  logic [5:0]        cnt;        // bit counter of word operations
  logic [WORD_W-1:0] word;       // row/column buffer
  pkt_t              rx_buf;

  // crossbar ports
  logic [CB-1:0]   ra, rb, wa;
  logic [ROWS-1:0] qa, qb, wmask, wdata;
  logic            we;

  crossbar_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .ra, .rb, .qa, .qb, .we, .wa, .wmask, .wdata
  );

  wire hit = cmd_valid && cmd.op != BC_NOP && (cmd.bcast || cmd.block == blk_id);

  // rows lo..hi set (empty when hi < lo)
  function automatic logic [ROWS-1:0] range_mask(logic [ROW_AW-1:0] lo, logic [ROW_AW-1:0] hi);
    logic [ROWS-1:0] ones = '1;
    return (ones << lo) & (ones >> (ROW_AW'(ROWS - 1) - hi));
  endfunction

  function automatic logic [CB-1:0] word_col(logic [OFF_W-1:0] off, logic [5:0] bitn);
    return CB'({off, bitn[4:0]});
  endfunction

  // ---- control ---------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pend       <= 1'b0;
      pend_cmd   <= '0;
      cur        <= '0;
      cnt        <= '0;
      word       <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      tx_valid   <= 1'b0;
      tx_pkt     <= '0;
      rx_ready   <= 1'b0;
      rx_buf     <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      if (hit) begin
        pend     <= 1'b1;
        pend_cmd <= cmd;
      end
      rx_ready <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (rx_ready && rx_valid) begin      // packet handed over now
            rx_buf <= rx_pkt;
            state  <= S_RX;
          end else if (pend && !(pend_cmd.op == BC_SEND && tx_valid)) begin
            pend <= hit;
            cur  <= pend_cmd;
            unique case (pend_cmd.op)
              BC_NOR:          state <= S_NOR_WR;
              BC_WRITE:        state <= S_WRITE;
              BC_READ, BC_SEND: state <= S_READ;
              default:         state <= S_IDLE;
            endcase
          end else if (!pend && !hit && rx_valid && !rx_ready) begin
            rx_ready <= 1'b1;            // take the packet next cycle
          end
        end
        S_NOR_WR: state <= S_IDLE;
        S_WRITE, S_RX: begin
          cnt <= cnt + 1'b1;
          if (cnt == 6'd31) state <= S_IDLE;
        end
        S_READ: begin
          cnt <= cnt + 1'b1;
          if (cnt != 0) word[cnt-1] <= qa[cur.row_lo[RB-1:0]];
          if (cnt == 6'd32) begin
            state <= S_IDLE;
            if (cur.op == BC_READ) begin
              resp_valid <= 1'b1;
              resp_data  <= {qa[cur.row_lo[RB-1:0]], word[WORD_W-2:0]};
            end else begin
              tx_valid         <= 1'b1;
              tx_pkt.dst_block <= cur.rel ? BLK_W'(blk_id + cur.dst_block) : cur.dst_block;
              tx_pkt.row       <= cur.row_lo;
              tx_pkt.off       <= cur.dst_off;
              tx_pkt.data      <= {qa[cur.row_lo[RB-1:0]], word[WORD_W-2:0]};
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- crossbar access -------------------------------------------------------
  always_comb begin
    ra    = '0;
    rb    = '0;
    we    = 1'b0;
    wa    = '0;
    wmask = '0;
    wdata = '0;
    unique case (state)
      S_IDLE: begin               // NOR reads its operands while starting
        ra = pend_cmd.ca[CB-1:0];
        rb = pend_cmd.cb[CB-1:0];
      end
      S_NOR_WR: begin
        we    = 1'b1;
        wa    = cur.cd[CB-1:0];
        wmask = range_mask(cur.row_lo, cur.row_hi);
        wdata = ~(qa | qb);
      end
      S_WRITE: begin
        we    = 1'b1;
        wa    = word_col(cur.off, cnt);
        wmask = range_mask(cur.row_lo, cur.row_hi);
        wdata = {ROWS{cur.data[cnt[4:0]]}};
      end
      S_RX: begin
        we    = 1'b1;
        wa    = word_col(rx_buf.off, cnt);
        wmask = range_mask(rx_buf.row, rx_buf.row);
        wdata = {ROWS{rx_buf.data[cnt[4:0]]}};
      end
      S_READ: ra = word_col(cur.off, cnt);
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE) || pend || tx_valid || rx_ready;

endmodule
