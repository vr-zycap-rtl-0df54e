// vrz_pkg: types and constants shared by the resource-level ICAP controller.
//
// Holds the 7-series configuration packet words the read and write FSMs send
// (sync word, NOOP, type-1/type-2 packet headers, CMD register codes), the
// frame geometry (101 words of 32 bits per frame), the frame address register
// (FAR) layout, the operation codes the processor puts on Op_Sel, and the
// struct that carries one cycle of ICAP input pins.
//
// The FAR layout (6 reserved, 3 block type, 1 top/bottom, 5 row, 10 column,
// 7 minor bits), the frame size and the operation list follow the source
// design. The numeric packet encodings are those of the 7-series
// configuration user guide that the design relies on; Op_Sel values 1..5
// follow the order in which the processor algorithm lists the operations.
package vrz_pkg;

  // ---- frame geometry --------------------------------------------------
  localparam int unsigned WORDS_PER_FRAME = 101;
  localparam int unsigned CLB_COL_HEIGHT  = 50;   // CLBs (and slice Ys) per clock row
  localparam int unsigned CLK_WORD        = 50;   // 0-based index of the HCLK/ECC word

  // ---- frame address register ------------------------------------------
  typedef struct packed {
    logic [5:0] reserved;
    logic [2:0] block_type;
    logic       top_bottom;  // 0: top half, 1: bottom half
    logic [4:0] row;         // HCLK / major row
    logic [9:0] column;      // major column
    logic [6:0] minor;       // minor frame
  } far_t;

  // ---- operations requested by the processor (Op_Sel) -------------------
  typedef enum logic [2:0] {
    OP_NONE        = 3'd0,
    OP_READ_FRAME  = 3'd1,
    OP_WRITE_FRAME = 3'd2,
    OP_DPR_LUT     = 3'd3,
    OP_DPR_FF      = 3'd4,
    OP_READ_BRAM   = 3'd5
  } op_t;

  // ---- one cycle of ICAPE2 inputs ---------------------------------------
  // csib and rdwrb are active low like the primitive's pins:
  // csib = 0 selects the port, rdwrb = 0 writes and rdwrb = 1 reads.
  typedef struct packed {
    logic        csib;
    logic        rdwrb;
    logic [31:0] data;
  } icap_req_t;

  localparam icap_req_t ICAP_IDLE = '{csib: 1'b1, rdwrb: 1'b0, data: 32'hFFFF_FFFF};

  // ---- configuration packets --------------------------------------------
  localparam logic [31:0] CFG_DUMMY = 32'hFFFF_FFFF;
  localparam logic [31:0] CFG_SYNC  = 32'hAA99_5566;
  localparam logic [31:0] CFG_NOOP  = 32'h2000_0000;

  // configuration register addresses
  localparam logic [4:0] REG_CRC    = 5'h00;
  localparam logic [4:0] REG_FAR    = 5'h01;
  localparam logic [4:0] REG_FDRI   = 5'h02;
  localparam logic [4:0] REG_FDRO   = 5'h03;
  localparam logic [4:0] REG_CMD    = 5'h04;
  localparam logic [4:0] REG_IDCODE = 5'h0C;

  // CMD register codes
  localparam logic [31:0] CMD_WCFG   = 32'h0000_0001;
  localparam logic [31:0] CMD_RCFG   = 32'h0000_0004;
  localparam logic [31:0] CMD_START  = 32'h0000_0005;
  localparam logic [31:0] CMD_RCRC   = 32'h0000_0007;
  localparam logic [31:0] CMD_DESYNC = 32'h0000_000D;

  // FAR value written after START so the last frame address is left parked
  localparam logic [31:0] FAR_PARK = 32'h03BE_0000;

  // Type-1 header: [31:29]=001, [28:27]=opcode (01 read, 10 write),
  // [17:13]=register, [10:0]=word count.
  function automatic logic [31:0] type1_hdr(input logic rd, input logic [4:0] reg_addr,
                                            input logic [10:0] count);
    return {3'b001, (rd ? 2'b01 : 2'b10), 9'd0, reg_addr, 2'b00, count};
  endfunction

  // Type-2 header: [31:29]=010, [28:27]=opcode, [26:0]=word count.
  function automatic logic [31:0] type2_hdr(input logic rd, input logic [26:0] count);
    return {3'b010, (rd ? 2'b01 : 2'b10), count};
  endfunction

  // Commands are stored in bitstream-file order and must reach the ICAP with
  // the bits of every byte reversed; frame data are sent as read back.
  function automatic logic [31:0] bitswap(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

endpackage
