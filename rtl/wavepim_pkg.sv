// wavepim_pkg: types and constants shared by the Wave-PIM blocks.
//
// The chip is a grid of 1K x 1K bit memory blocks that compute in place with
// row-parallel NOR operations, grouped into tiles of 256 blocks that are joined
// by an H-tree of 4-child switches. This package holds the field widths, the
// host instruction formats, the command that the central controller broadcasts
// to the blocks and the packet that travels through the H-tree.
//
// Taken from the paper: 1024 x 1024 blocks, 32-bit data words (so a row holds
// 32 words and a word offset is 5 bits), 256 blocks and 85 H-tree switches per
// tile, 2 GB (64 tiles) as the main chip size, and the look-up-table (LUT)
// instruction layout: opcode [63:57], Row ID [56:31], Offset_S [30:26],
// LUT Block ID [25:5], Offset_D [4:0]. The other instruction layouts, the
// opcode values, the block command and the packet format are this design's own.
package wavepim_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int WORD_W   = 32;   // data precision
  localparam int OFF_W    = 5;    // word offset within a row (32 words)
  localparam int ROW_AW   = 10;   // widest row address (1024 rows)
  localparam int COL_AW   = 10;   // widest column address (1024 columns)
  localparam int BLK_W    = 16;   // block id width (up to 65536 blocks)
  localparam int LOC_W    = 48;   // global bit address used by the LUT unit

  // ---- host instructions (64 bits, opcode in [63:57]) -------------------
  typedef enum logic [6:0] {
    OP_NOP     = 7'h00,
    OP_SETROWS = 7'h01,  // set the active row range used by NOR/ADD/WRITE
    OP_NOR     = 7'h02,  // one row-parallel NOR: col d = NOR(col a, col b)
    OP_ADD     = 7'h03,  // bit-serial integer add, expanded into NORs
    OP_WRITE   = 7'h04,  // host word into a block (broadcast over the rows)
    OP_READ    = 7'h05,  // one word of one block back to the host
    OP_SEND    = 7'h06,  // memcpy of one word block-to-block over the H-tree
    OP_LUT     = 7'h40   // look-up-table instruction (Figure 4 layout)
  } opcode_e;

  typedef struct packed {
    opcode_e            opcode;
    logic [56:20]       unused;
    logic [ROW_AW-1:0]  row_hi;
    logic [ROW_AW-1:0]  row_lo;
  } ins_setrows_t;

  typedef struct packed {   // OP_NOR and OP_ADD
    opcode_e            opcode;
    logic [56:52]       width_m1;   // ADD: operand width - 1
    logic               bcast;      // all blocks (1) or only `block` (0)
    logic [BLK_W-1:0]   block;
    logic [COL_AW-1:0]  cd;         // result column (ADD: first result bit)
    logic [COL_AW-1:0]  ca;
    logic [COL_AW-1:0]  cb;
    logic [4:0]         unused;
  } ins_alu_t;

  typedef struct packed {   // OP_WRITE and OP_READ
    opcode_e            opcode;
    logic               bcast;
    logic [BLK_W-1:0]   block;
    logic [ROW_AW-1:0]  row;        // READ only; WRITE uses the row range
    logic [OFF_W-1:0]   off;
    logic [24:0]        unused;
  } ins_mem_t;

  typedef struct packed {   // OP_SEND
    opcode_e            opcode;
    logic               bcast;      // every block sends
    logic               rel;        // dst is an offset from the sender's id
    logic [BLK_W-1:0]   src;
    logic [BLK_W-1:0]   dst;
    logic [ROW_AW-1:0]  row;        // same row at both ends
    logic [OFF_W-1:0]   src_off;
    logic [OFF_W-1:0]   dst_off;
    logic [2:0]         unused;
  } ins_send_t;

  typedef struct packed {   // OP_LUT, bit positions as in the paper
    opcode_e            opcode;     // [63:57]
    logic [25:0]        row_id;     // [56:31] global row (block * rows + row)
    logic [4:0]         offset_s;   // [30:26] word holding the index
    logic [20:0]        lut_block;  // [25:5]  first block of the table
    logic [4:0]         offset_d;   // [4:0]   word receiving the entry
  } ins_lut_t;

  // ---- controller -> block command ---------------------------------------
  typedef enum logic [2:0] {
    BC_NOP   = 3'd0,
    BC_NOR   = 3'd1,
    BC_WRITE = 3'd2,
    BC_READ  = 3'd3,
    BC_SEND  = 3'd4
  } blk_op_e;

  typedef struct packed {
    blk_op_e            op;
    logic               bcast;
    logic [BLK_W-1:0]   block;
    logic [COL_AW-1:0]  ca;
    logic [COL_AW-1:0]  cb;
    logic [COL_AW-1:0]  cd;
    logic [ROW_AW-1:0]  row_lo;     // row range of NOR/WRITE; READ/SEND row
    logic [ROW_AW-1:0]  row_hi;
    logic [OFF_W-1:0]   off;
    logic               rel;
    logic [BLK_W-1:0]   dst_block;
    logic [OFF_W-1:0]   dst_off;
    logic [WORD_W-1:0]  data;
  } blk_cmd_t;

  // ---- H-tree packet --------------------------------------------------------
  typedef struct packed {
    logic [BLK_W-1:0]   dst_block;
    logic [ROW_AW-1:0]  row;
    logic [OFF_W-1:0]   off;
    logic [WORD_W-1:0]  data;
  } pkt_t;

endpackage
