// central_controller: the chip's instruction decoder.
//
// The host sends 64-bit instructions (ins_valid/ins_ready, plus a 32-bit
// ins_data word used by WRITE). The controller turns each one into commands
// on the block command bus, which reaches every block of every tile:
//   SETROWS  set the active row range (reset: all rows)
//   NOR      one row-parallel NOR in one block or all blocks
//   ADD      2 + 9*width NORs generated by nor_sequencer
//   WRITE    host word into (active rows, offset) of one block or all blocks
//   READ     one word of one block, returned on resp_valid/resp_data
//   SEND     memcpy of one word, block to block over the H-tree; with bcast
//            every block sends, and with rel the destination is the sender's
//            id plus dst, which moves data to neighbouring elements in parallel
//   LUT      look-up-table instruction, executed by lut_unit as READ, READ,
//            WRITE steps
// Commands are issued one at a time. After issuing, the controller waits
// SETTLE cycles (the busy and empty flags are registered on the way back),
// then until no block is busy and the H-tree holds no packet. An instruction
// is therefore complete, including every packet it sent, before the next one
// starts, and a read response is always caught while waiting.
//
// The decoder between host and blocks, the micro sequences it generates and
// the LUT steps follow the paper; the instruction set apart from the LUT
// layout, the row-range register and the issue-and-wait rule are this
// design's own.
module central_controller
  import wavepim_pkg::*;
#(
  parameter int ROWS   = 1024,
  parameter int COLS   = 1024,
  parameter int SETTLE = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              ins_valid,
  output logic              ins_ready,
  input  logic [63:0]       ins,
  input  logic [WORD_W-1:0] ins_data,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_data,
  // blocks
  output logic              cmd_valid,
  output blk_cmd_t          cmd,
  input  logic              blk_busy,
  input  logic              net_empty,
  input  logic              blk_resp_valid,
  input  logic [WORD_W-1:0] blk_resp_data
);
  typedef enum logic [2:0] {C_IDLE, C_WAIT, C_SEQ, C_LUT} cstate_e;
  cstate_e state, ret;

  ins_alu_t     ialu;
  ins_mem_t     imem;
  ins_send_t    isnd;
  ins_setrows_t irows;
  ins_lut_t     ilut;
  assign ialu  = ins_alu_t'(ins);
  assign imem  = ins_mem_t'(ins);
  assign isnd  = ins_send_t'(ins);
  assign irows = ins_setrows_t'(ins);
  assign ilut  = ins_lut_t'(ins);

  logic [ROW_AW-1:0] row_lo, row_hi;
  logic [3:0]        settle;
  logic              to_host;          // current READ answers the host
  logic [WORD_W-1:0] rdata;
  logic [WORD_W-1:0] rdata_now;        // read data, valid when a response is in
  ins_alu_t          alu_q;            // ADD being sequenced

  // sequencer
  logic              seq_start, seq_busy, seq_valid, seq_done;
  logic [COL_AW-1:0] seq_cd, seq_ca, seq_cb;
  // LUT unit
  logic              lut_start, lut_busy, lut_req, lut_we, lut_done;
  logic [BLK_W-1:0]  lut_block;
  logic [ROW_AW-1:0] lut_row;
  logic [OFF_W-1:0]  lut_off;
  logic [WORD_W-1:0] lut_wdata;

  nor_sequencer #(.COLS(COLS)) u_seq (
    .clk, .rst_n, .start(seq_start),
    .cd(ialu.cd), .ca(ialu.ca), .cb(ialu.cb), .width(6'(ialu.width_m1) + 6'd1),
    .busy(seq_busy), .op_valid(seq_valid),
    .op_cd(seq_cd), .op_ca(seq_ca), .op_cb(seq_cb), .op_done(seq_done)
  );

  lut_unit #(.ROWS(ROWS), .COLS(COLS)) u_lut (
    .clk, .rst_n, .start(lut_start), .ins(ilut), .busy(lut_busy),
    .req_valid(lut_req), .req_we(lut_we), .req_block(lut_block),
    .req_row(lut_row), .req_off(lut_off), .req_wdata(lut_wdata),
    .req_done(lut_done), .req_rdata(rdata_now)
  );

  // a response that arrives together with the end of busy is used directly
  assign rdata_now = blk_resp_valid ? blk_resp_data : rdata;
  wire accept = ins_valid && ins_ready;
  assign ins_ready = state == C_IDLE;
  assign seq_start = accept && ialu.opcode == OP_ADD;
  assign lut_start = accept && ilut.opcode == OP_LUT;
  wire   finished  = state == C_WAIT && settle == 0 && !blk_busy && net_empty;
  assign seq_done  = finished && ret == C_SEQ;
  assign lut_done  = finished && ret == C_LUT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; ret <= C_IDLE;
      row_lo <= '0; row_hi <= ROW_AW'(ROWS - 1);
      settle <= '0; to_host <= 1'b0; rdata <= '0; alu_q <= '0;
      cmd_valid <= 1'b0; cmd <= '0;
      resp_valid <= 1'b0; resp_data <= '0;
    end else begin
      cmd_valid  <= 1'b0;
      resp_valid <= 1'b0;
      if (blk_resp_valid) rdata <= blk_resp_data;
      unique case (state)
        C_IDLE: if (accept) begin
          cmd        <= '0;
          cmd.row_lo <= row_lo;
          cmd.row_hi <= row_hi;
          settle     <= 4'(SETTLE);
          ret        <= C_IDLE;
          to_host    <= 1'b0;
          unique case (ialu.opcode)
            OP_SETROWS: begin
              row_lo <= irows.row_lo;
              row_hi <= irows.row_hi;
            end
            OP_NOR: begin
              cmd_valid <= 1'b1;
              cmd.op    <= BC_NOR;
              cmd.bcast <= ialu.bcast;
              cmd.block <= ialu.block;
              cmd.ca    <= ialu.ca;
              cmd.cb    <= ialu.cb;
              cmd.cd    <= ialu.cd;
              state     <= C_WAIT;
            end
            OP_ADD: begin
              alu_q <= ialu;
              state <= C_SEQ;
            end
            OP_WRITE: begin
              cmd_valid <= 1'b1;
              cmd.op    <= BC_WRITE;
              cmd.bcast <= imem.bcast;
              cmd.block <= imem.block;
              cmd.off   <= imem.off;
              cmd.data  <= ins_data;
              state     <= C_WAIT;
            end
            OP_READ: begin
              cmd_valid  <= 1'b1;
              cmd.op     <= BC_READ;
              cmd.block  <= imem.block;
              cmd.row_lo <= imem.row;
              cmd.off    <= imem.off;
              to_host    <= 1'b1;
              state      <= C_WAIT;
            end
            OP_SEND: begin
              cmd_valid     <= 1'b1;
              cmd.op        <= BC_SEND;
              cmd.bcast     <= isnd.bcast;
              cmd.block     <= isnd.src;
              cmd.rel       <= isnd.rel;
              cmd.dst_block <= isnd.dst;
              cmd.row_lo    <= isnd.row;
              cmd.off       <= isnd.src_off;
              cmd.dst_off   <= isnd.dst_off;
              state         <= C_WAIT;
            end
            OP_LUT: state <= C_LUT;
            default: ;                      // NOP and unknown opcodes
          endcase
        end
        C_SEQ: begin
          if (!seq_busy) state <= C_IDLE;
          else if (seq_valid) begin
            cmd_valid  <= 1'b1;
            cmd        <= '0;
            cmd.op     <= BC_NOR;
            cmd.bcast  <= alu_q.bcast;
            cmd.block  <= alu_q.block;
            cmd.ca     <= seq_ca;
            cmd.cb     <= seq_cb;
            cmd.cd     <= seq_cd;
            cmd.row_lo <= row_lo;
            cmd.row_hi <= row_hi;
            settle     <= 4'(SETTLE);
            ret        <= C_SEQ;
            state      <= C_WAIT;
          end
        end
        C_LUT: begin
          if (!lut_busy) state <= C_IDLE;
          else if (lut_req) begin
            cmd_valid  <= 1'b1;
            cmd        <= '0;
            cmd.op     <= lut_we ? BC_WRITE : BC_READ;
            cmd.block  <= lut_block;
            cmd.row_lo <= lut_row;
            cmd.row_hi <= lut_row;
            cmd.off    <= lut_off;
            cmd.data   <= lut_wdata;
            settle     <= 4'(SETTLE);
            ret        <= C_LUT;
            state      <= C_WAIT;
          end
        end
        C_WAIT: begin
          if (settle != 0) settle <= settle - 1'b1;
          else if (finished) begin
            state <= ret;
            if (to_host) begin
              resp_valid <= 1'b1;
              resp_data  <= rdata_now;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
