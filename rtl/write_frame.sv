// write_frame: ICAP frame write FSM.
//
// On start it writes num_frames frames, taken from block RAM starting at
// word address base, into configuration memory starting at frame address
// far, and appends one pad frame of zeros that pushes the last data frame
// out of the frame buffer of the configuration logic.
//
// Sequence on the ICAP (command words bit-swapped within each byte, frame
// data sent exactly as read back):
//   dummy, sync, NOOP, CMD=RCRC, NOOP, IDCODE=IDCODE, CMD=WCFG, NOOP,
//   FAR=far, type-1 write FDRI, NOOP, type-2 write of
//   N = 101 * (num_frames + 1) words, the data frames, the pad frame,
//   NOOP, CMD=START, FAR=parking address, NOOP, CMD=DESYNC,
//   then TAIL_NOOPS NOOPs while the desynchronisation completes (the
//   source design observed six cycles for it; nine are given here).
// No CRC word is sent: the configuration CRC check is assumed disabled in
// the bitstream settings, as in the source design.
//
// A num_frames above MAX_FRAMES (the block RAM's capacity) is cut to
// MAX_FRAMES; with 0 only the pad frame is sent.
//
// Block RAM interface: b_addr is presented one cycle before its word is
// needed and b_dout is expected one cycle later (frame_bram timing); one
// word is sent per clock.
//
// Timing: done (Write_done) pulses for one cycle at the end; with the
// defaults a one-frame write (data + pad) takes 237 cycles from start to
// done, the figure measured for the source design, and each extra frame
// adds 101. The command order, the pad frame and the bit-swap rule follow
// the source design; the word count of the type-1 FDRI packet (zero), the
// parking FAR and the tail length that gives 237 cycles are this design's.
module write_frame
  import vrz_pkg::*;
#(
  parameter int unsigned MAX_FRAMES = 4,
  parameter int unsigned BRAM_AW    = 9,
  parameter logic [31:0] IDCODE     = 32'h0372_7093,
  parameter int unsigned TAIL_NOOPS = 9,
  localparam int unsigned NW        = $clog2((MAX_FRAMES + 1) * WORDS_PER_FRAME + 1),
  localparam int unsigned FW        = $clog2(MAX_FRAMES + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [31:0]        far,
  input  logic [FW-1:0]      num_frames,
  input  logic [BRAM_AW-1:0] base,
  output logic               busy,
  output logic               done,
  // ICAP
  output icap_req_t          icap,
  // block RAM read port
  output logic               b_en,
  output logic [BRAM_AW-1:0] b_addr,
  input  logic [31:0]        b_dout
);

  localparam int unsigned PRE_LEN  = 16;
  localparam int unsigned POST_LEN = 8 + TAIL_NOOPS;
  localparam int unsigned CW       = 8;

  typedef enum logic [2:0] {S_IDLE, S_CMD, S_DATA, S_PAD, S_POST, S_DONE} state_t;

  state_t             state;
  logic [31:0]        far_q;
  logic [NW-1:0]      n_data, cnt;
  logic [CW-1:0]      idx;
  logic [BRAM_AW-1:0] ptr;
  logic [FW-1:0]      nf_c;

  // frame count limited to what the frame buffer holds
  assign nf_c = (num_frames > FW'(MAX_FRAMES)) ? FW'(MAX_FRAMES) : num_frames;

  function automatic logic [31:0] pre_word(input logic [CW-1:0] i, input logic [31:0] f,
                                           input logic [NW-1:0] n);
    case (i)
      0:       return CFG_DUMMY;
      1:       return CFG_SYNC;
      2:       return CFG_NOOP;
      3:       return type1_hdr(1'b0, REG_CMD, 11'd1);
      4:       return CMD_RCRC;
      5:       return CFG_NOOP;
      6:       return type1_hdr(1'b0, REG_IDCODE, 11'd1);
      7:       return IDCODE;
      8:       return type1_hdr(1'b0, REG_CMD, 11'd1);
      9:       return CMD_WCFG;
      10:      return CFG_NOOP;
      11:      return type1_hdr(1'b0, REG_FAR, 11'd1);
      12:      return f;
      13:      return type1_hdr(1'b0, REG_FDRI, 11'd0);
      14:      return CFG_NOOP;
      15:      return type2_hdr(1'b0, 27'(n + NW'(WORDS_PER_FRAME)));
      default: return CFG_NOOP;
    endcase
  endfunction

  function automatic logic [31:0] post_word(input logic [CW-1:0] i);
    case (i)
      0:       return CFG_NOOP;
      1:       return type1_hdr(1'b0, REG_CMD, 11'd1);
      2:       return CMD_START;
      3:       return type1_hdr(1'b0, REG_FAR, 11'd1);
      4:       return FAR_PARK;
      5:       return CFG_NOOP;
      6:       return type1_hdr(1'b0, REG_CMD, 11'd1);
      7:       return CMD_DESYNC;
      default: return CFG_NOOP;
    endcase
  endfunction

  assign busy   = (state != S_IDLE);
  assign b_en   = busy;
  assign b_addr = ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      icap   <= ICAP_IDLE;
      far_q  <= '0;
      n_data <= '0;
      cnt    <= '0;
      idx    <= '0;
      ptr    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          icap <= ICAP_IDLE;
          if (start) begin
            far_q  <= far;
            n_data <= NW'(nf_c * WORDS_PER_FRAME);
            ptr    <= base;
            idx    <= '0;
            state  <= S_CMD;
          end
        end
        S_CMD: begin
          icap <= '{csib: 1'b0, rdwrb: 1'b0, data: bitswap(pre_word(idx, far_q, n_data))};
          idx  <= idx + 1'b1;
          if (idx == CW'(PRE_LEN - 1)) begin
            ptr   <= ptr + 1'b1;   // word at base is being fetched now
            cnt   <= '0;
            state <= (n_data == '0) ? S_PAD : S_DATA;
          end
        end
        S_DATA: begin
          icap <= '{csib: 1'b0, rdwrb: 1'b0, data: b_dout};
          ptr  <= ptr + 1'b1;
          cnt  <= cnt + 1'b1;
          if (cnt == n_data - 1'b1) begin
            cnt   <= '0;
            state <= S_PAD;
          end
        end
        S_PAD: begin
          icap <= '{csib: 1'b0, rdwrb: 1'b0, data: 32'h0000_0000};
          cnt  <= cnt + 1'b1;
          if (cnt == NW'(WORDS_PER_FRAME - 1)) begin
            idx   <= '0;
            state <= S_POST;
          end
        end
        S_POST: begin
          icap <= '{csib: 1'b0, rdwrb: 1'b0, data: bitswap(post_word(idx))};
          idx  <= idx + 1'b1;
          if (idx == CW'(POST_LEN - 1)) state <= S_DONE;
        end
        S_DONE: begin
          icap  <= ICAP_IDLE;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the write FSM never reads, so RDWRB stays low
  a_write_only: assert property (@(posedge clk) disable iff (rst) !icap.rdwrb)
    else $error("write_frame: RDWRB raised");

endmodule
