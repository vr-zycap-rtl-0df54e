// vr_zycap: resource-level ICAP reconfiguration controller (top level and
// main FSM).
//
// The controller sits in the programmable logic next to the ICAP and lets
// software rewrite single LUTs and flip-flops of a running design by a
// read-modify-write of the frames that hold them, without any pre-built
// partial bitstream. The processor sets the operands and Op_Sel and pulses
// start; done pulses when the operation has finished.
//
//   Op_Sel 1  read frame  : read num_frames frames (leading dummy frame
//                           included) from start_addr into block RAM word 0..
//   Op_Sel 2  write frame : write num_frames - 1 frames from block RAM word
//                           101 on (the frames a read placed after its dummy
//                           frame) to start_addr, followed by a pad frame
//   Op_Sel 3  DPR_LUT     : slice2far turns xybel into a frame address and
//                           word offset, init2fw turns init into four frame
//                           words; four frames (plus dummy) are read and, on
//                           their way into block RAM, the 16-bit half holding
//                           the LUT in each frame is replaced; the four frames
//                           are then written back
//   Op_Sel 4  DPR_FF      : bit_translation turns bit_location into word and
//                           bit; the DUT runs on for cap_cycle cycles, then
//                           its clock is stopped, CAP is pulsed to
//                           copy flip-flops into their configuration cells,
//                           the frame at start_addr is read, the flip-flop's
//                           bit is flipped on its way into block RAM, the
//                           frame is written back, GSR is pulsed for one
//                           cycle to load the flip-flops from configuration
//                           memory, GSR_SETTLE cycles are left for the global
//                           line to settle, and the DUT clock is restarted
//   Op_Sel 5  read BRAM   : bram_word returns block RAM word mem_addr
//   other values          : no operation, done follows at once
//
// Only one read_frame and one write_frame exist; the ICAP is multiplexed
// between them. cap drives a CAPTURE primitive, gsr a STARTUP primitive and
// dut_clk_en the enable of the clock buffer of the device under test; the
// ICAP itself is reached through the icap_* ports.
//
// Timing (100 MHz ICAP clock): one-frame read 239 cycles, one-frame write
// 237 cycles, DPR_LUT 1084 cycles and DPR_FF 487 + cap_cycle cycles from
// start to done (the source design reports 1087 for DPR_LUT).
//
// The operations, their operands, the module split, on-the-fly
// modification, capture/GSR handling and block RAM sizing follow the source
// design. The Op_Sel encoding, the meaning of num_frames for a plain write,
// the block RAM layout (dummy frame first, data from word 101), running
// the flip-flop bit translation before the read, the cap_cycle operand and
// the GSR settling wait are this design's choices.
module vr_zycap
  import vrz_pkg::*;
#(
  parameter logic [31:0] IDCODE     = 32'h0372_7093,
  parameter int unsigned BRAM_DEPTH = 512,
  parameter int unsigned GSR_SETTLE = 2,
  localparam int unsigned AW        = $clog2(BRAM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  // processor side (GPIO registers)
  input  logic          start,
  input  logic [2:0]    op_sel,
  input  logic [31:0]   start_addr,
  input  logic [31:0]   xybel,
  input  logic [63:0]   init,
  input  logic [2:0]    num_frames,
  input  logic [11:0]   bit_location,
  input  logic [15:0]   cap_cycle,
  input  logic [AW-1:0] mem_addr,
  output logic          busy,
  output logic          done,
  output logic [31:0]   bram_word,
  // ICAPE2
  output logic          icap_csib,
  output logic          icap_rdwrb,
  output logic [31:0]   icap_i,
  input  logic [31:0]   icap_o,
  // CAPTURE, STARTUP and DUT clock buffer
  output logic          cap,
  output logic          gsr,
  output logic          dut_clk_en
);

  localparam int unsigned LUT_FRAMES = 4;
  localparam int unsigned DATA_BASE  = WORDS_PER_FRAME;   // first word after the dummy frame

  typedef enum logic [2:0] {S_IDLE, S_XLATE, S_RD, S_WR, S_GSR, S_CLKON, S_BRAM, S_DONE} state_t;

  state_t state;
  op_t    op;
  logic [3:0] settle;

  // ---- translation units ---------------------------------------------------
  logic       s2f_start, s2f_valid, s2f_hi;
  far_t       s2f_far;
  logic [6:0] s2f_word;
  logic       i2f_valid;
  logic [15:0] fw [4];
  logic       bt_start, bt_valid, bt_in_range;
  logic [6:0] bt_word;
  logic [4:0] bt_bit;

  slice2far u_slice2far (.clk, .rst, .start(s2f_start), .xybel, .valid(s2f_valid),
                         .far(s2f_far), .word_off(s2f_word), .hi_half(s2f_hi));
  init2fw u_init2fw (.clk, .rst, .start(s2f_start), .init, .valid(i2f_valid), .fw);
  bit_translation u_bit_translation (.clk, .rst, .start(bt_start), .bit_location,
                                     .valid(bt_valid), .word_pos(bt_word), .bit_pos(bt_bit),
                                     .in_range(bt_in_range));

  // ---- read and write FSMs -------------------------------------------------
  logic          rf_start, rf_busy, rf_done, rf_capture, rf_valid, rf_cap, rf_clk_dis, clk_release;
  logic [31:0]   rf_far;
  logic [2:0]    rf_nf;
  logic [AW-1:0] rf_addr;
  logic [31:0]   rf_data;
  icap_req_t     rf_icap, wf_icap, icap;

  logic          wf_start, wf_busy, wf_done, wf_ben;
  logic [31:0]   wf_far;
  logic [2:0]    wf_nf;
  logic [AW-1:0] wf_baddr;
  logic [31:0]   b_dout;

  read_frame #(.MAX_FRAMES(LUT_FRAMES + 1)) u_read_frame (
    .clk, .rst, .start(rf_start), .far(rf_far), .num_frames(rf_nf), .capture(rf_capture),
    .cap_cycle, .clk_release, .busy(rf_busy), .done(rf_done), .icap(rf_icap), .icap_o,
    .rd_valid(rf_valid), .rd_addr(rf_addr), .rd_data(rf_data), .cap(rf_cap),
    .dut_clk_dis(rf_clk_dis));

  write_frame #(.MAX_FRAMES(LUT_FRAMES), .BRAM_AW(AW), .IDCODE(IDCODE)) u_write_frame (
    .clk, .rst, .start(wf_start), .far(wf_far), .num_frames(wf_nf), .base(AW'(DATA_BASE)),
    .busy(wf_busy), .done(wf_done), .icap(wf_icap), .b_en(wf_ben), .b_addr(wf_baddr), .b_dout);

  // ---- frame memory with on-the-fly modification of golden words -----------
  logic          a_we, b_en;
  logic [AW-1:0] b_addr;
  logic [31:0]   a_din;
  logic          lut_hit, ff_hit;
  logic [31:0]   lut_word, ff_word;

  always_comb begin
    lut_hit  = 1'b0;
    lut_word = rf_data;
    for (int k = 0; k < LUT_FRAMES; k++) begin
      if (rf_addr == AW'((k + 1) * WORDS_PER_FRAME) + AW'(s2f_word)) begin
        lut_hit  = (op == OP_DPR_LUT);
        lut_word = s2f_hi ? {fw[k], rf_data[15:0]} : {rf_data[31:16], fw[k]};
      end
    end
    ff_hit  = (op == OP_DPR_FF) && bt_in_range && (rf_addr == AW'(DATA_BASE) + AW'(bt_word));
    ff_word = rf_data ^ (32'd1 << bt_bit);
  end

  assign a_din = lut_hit ? lut_word : ff_hit ? ff_word : rf_data;
  assign a_we   = rf_valid;
  assign b_en   = wf_busy ? wf_ben : 1'b1;
  assign b_addr = wf_busy ? wf_baddr : mem_addr;

  frame_bram #(.DEPTH(BRAM_DEPTH)) u_frame_bram (
    .clk, .a_we, .a_addr(rf_addr), .a_din, .b_en, .b_addr, .b_dout);

  // ---- ICAP multiplexer ------------------------------------------------------
  assign icap       = wf_busy ? wf_icap : rf_icap;
  assign icap_csib  = icap.csib;
  assign icap_rdwrb = icap.rdwrb;
  assign icap_i     = icap.data;
  assign cap        = rf_cap;
  assign dut_clk_en = !rf_clk_dis;

  // ---- main FSM ------------------------------------------------------------
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign s2f_start = (state == S_IDLE) && start && (op_t'(op_sel) == OP_DPR_LUT);
  assign bt_start  = (state == S_IDLE) && start && (op_t'(op_sel) == OP_DPR_FF);

  always_comb begin
    rf_start   = 1'b0;
    rf_far     = start_addr;
    rf_nf      = num_frames;
    rf_capture = 1'b0;
    wf_start   = 1'b0;
    wf_far     = start_addr;
    wf_nf      = (num_frames == '0) ? '0 : num_frames - 3'd1;
    case (op)
      OP_DPR_LUT: begin
        rf_far = s2f_far;
        rf_nf  = 3'(LUT_FRAMES + 1);
        wf_far = s2f_far;
        wf_nf  = 3'(LUT_FRAMES);
      end
      OP_DPR_FF: begin
        rf_nf      = 3'd2;
        rf_capture = 1'b1;
        wf_nf      = 3'd1;
      end
      default: ;
    endcase
    if (state == S_IDLE && start && op_t'(op_sel) == OP_READ_FRAME) begin
      rf_start = 1'b1;
      rf_nf    = num_frames;
    end
    if (state == S_XLATE && ((s2f_valid && i2f_valid) || bt_valid)) rf_start = 1'b1;
    if (state == S_IDLE && start && op_t'(op_sel) == OP_WRITE_FRAME) begin
      wf_start = 1'b1;
      wf_nf    = (num_frames == '0) ? '0 : num_frames - 3'd1;
    end
    if (state == S_RD && rf_done && op != OP_READ_FRAME) wf_start = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      op          <= OP_NONE;
      gsr         <= 1'b0;
      clk_release <= 1'b0;
      bram_word   <= '0;
      settle      <= '0;
    end else begin
      gsr         <= 1'b0;
      clk_release <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          op <= op_t'(op_sel);
          case (op_t'(op_sel))
            OP_READ_FRAME:          state <= S_RD;
            OP_WRITE_FRAME:         state <= S_WR;
            OP_DPR_LUT, OP_DPR_FF:  state <= S_XLATE;
            OP_READ_BRAM:           state <= S_BRAM;
            default:                state <= S_DONE;
          endcase
        end
        S_XLATE: if ((s2f_valid && i2f_valid) || bt_valid) state <= S_RD;
        S_RD: if (rf_done) state <= (op == OP_READ_FRAME) ? S_DONE : S_WR;
        S_WR: if (wf_done) begin
          if (op == OP_DPR_FF) begin
            gsr    <= 1'b1;
            settle <= '0;
            state  <= S_GSR;
          end else begin
            state <= S_DONE;
          end
        end
        S_GSR: begin
          settle <= settle + 1'b1;
          if (settle == 4'(GSR_SETTLE)) begin
            clk_release <= 1'b1;
            state       <= S_CLKON;
          end
        end
        S_CLKON: state <= S_DONE;
        S_BRAM: begin
          bram_word <= b_dout;
          state     <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // the two FSMs never drive the ICAP at the same time
  a_one_master: assert property (@(posedge clk) disable iff (rst) !(rf_busy && wf_busy))
    else $error("vr_zycap: read and write FSM active together");

endmodule
