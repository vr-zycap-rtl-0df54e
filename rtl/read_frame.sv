// read_frame: ICAP read-back FSM.
//
// On start it reads num_frames frames (the leading dummy frame included)
// from configuration memory, beginning at frame address far, and streams
// every returned word out on rd_valid/rd_addr/rd_data, word 0 being the
// first word of the dummy frame. The caller writes the stream into block
// RAM and may change words on the way.
//
// Sequence on the ICAP (all command words bit-swapped within each byte):
//   dummy, sync, NOOP, CMD=RCRC, CMD=RCFG, FAR=far, type-1 read FDRO,
//   NOOP, type-2 read of N = 101 * num_frames words, PRE_NOOPS NOOPs,
//   then one cycle with the port deselected while RDWRB turns to read,
//   N read cycles, deselect while RDWRB turns back to write, and finally
//   CMD=DESYNC and two NOOPs.
// RDWRB only ever changes while CSIB is high (checked by an assertion).
// Read data return RD_LAT cycles after the cycle in which the read was
// presented on the pins. A num_frames above MAX_FRAMES (the block RAM's
// capacity) is cut to MAX_FRAMES, and 0 is taken as 1 (the dummy frame).
//
// With capture = 1 the FSM first lets the device under test run for
// cap_cycle more clock cycles (the cycle whose state is wanted; 0 stops it
// at once), then raises dut_clk_dis to stop its clock, waits STOP_WAIT cycles, pulses cap for one cycle so the
// CAPTURE primitive copies every flip-flop into its shadow cell, waits
// CAP_WAIT cycles and then reads. dut_clk_dis stays high until clk_release.
//
// Timing: done pulses one cycle after the last command; with the defaults a
// one-frame read (data + dummy) takes 239 cycles from start to done, the
// figure measured for the source design, and every extra frame adds 101.
// The order of the commands, the dummy frame, the CE/RDWR rule, the capture
// step and counting the cycle at which to capture follow the source design;
// the cap_cycle input that sets that cycle, the NOOP count that pads the
// sequence to 239 cycles, the zero word count of the type-1 FDRO packet,
// the read latency and the wait lengths are this design's choices.
module read_frame
  import vrz_pkg::*;
#(
  parameter int unsigned MAX_FRAMES = 5,
  parameter int unsigned PRE_NOOPS  = 15,
  parameter int unsigned RD_LAT     = 1,
  parameter int unsigned STOP_WAIT  = 2,
  parameter int unsigned CAP_WAIT   = 2,
  localparam int unsigned NW        = $clog2(MAX_FRAMES * WORDS_PER_FRAME + 1),
  localparam int unsigned FW        = $clog2(MAX_FRAMES + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [31:0]   far,
  input  logic [FW-1:0] num_frames,
  input  logic          capture,
  input  logic [15:0]   cap_cycle,
  input  logic          clk_release,
  output logic          busy,
  output logic          done,
  // ICAP
  output icap_req_t     icap,
  input  logic [31:0]   icap_o,
  // read-back stream
  output logic          rd_valid,
  output logic [NW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  // capture and clock control
  output logic          cap,
  output logic          dut_clk_dis
);

  localparam int unsigned PRE_LEN  = 12 + PRE_NOOPS;
  localparam int unsigned POST_LEN = 4;
  localparam int unsigned CW       = 8;

  typedef enum logic [3:0] {
    S_IDLE, S_RUN, S_STOPCLK, S_CAP, S_CAPWAIT, S_CMD, S_SW_RD, S_READ, S_SW_WR, S_POST, S_DONE
  } state_t;

  state_t        state;
  logic [31:0]   far_q;
  logic [NW-1:0] n_words, rd_cnt, rx_cnt;
  logic [CW-1:0] idx;
  logic [15:0]   run_cnt;
  logic [RD_LAT-1:0] rd_pipe;
  logic [FW-1:0] nf_c;

  // frame count limited to what the frame buffer holds
  always_comb begin
    if (num_frames > FW'(MAX_FRAMES)) nf_c = FW'(MAX_FRAMES);
    else if (num_frames == '0)        nf_c = FW'(1);
    else                              nf_c = num_frames;
  end

  function automatic logic [31:0] pre_word(input logic [CW-1:0] i, input logic [31:0] f,
                                           input logic [NW-1:0] n);
    case (i)
      0:       return CFG_DUMMY;
      1:       return CFG_SYNC;
      2:       return CFG_NOOP;
      3:       return type1_hdr(1'b0, REG_CMD, 11'd1);
      4:       return CMD_RCRC;
      5:       return type1_hdr(1'b0, REG_CMD, 11'd1);
      6:       return CMD_RCFG;
      7:       return type1_hdr(1'b0, REG_FAR, 11'd1);
      8:       return f;
      9:       return type1_hdr(1'b1, REG_FDRO, 11'd0);
      10:      return CFG_NOOP;
      11:      return type2_hdr(1'b1, 27'(n));
      default: return CFG_NOOP;
    endcase
  endfunction

  function automatic logic [31:0] post_word(input logic [CW-1:0] i);
    case (i)
      0:       return type1_hdr(1'b0, REG_CMD, 11'd1);
      1:       return CMD_DESYNC;
      default: return CFG_NOOP;
    endcase
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      icap        <= ICAP_IDLE;
      far_q       <= '0;
      n_words     <= '0;
      rd_cnt      <= '0;
      idx         <= '0;
      run_cnt     <= '0;
      done        <= 1'b0;
      cap         <= 1'b0;
      dut_clk_dis <= 1'b0;
    end else begin
      done <= 1'b0;
      cap  <= 1'b0;
      if (clk_release) dut_clk_dis <= 1'b0;
      case (state)
        S_IDLE: begin
          icap <= ICAP_IDLE;
          if (start) begin
            far_q   <= far;
            n_words <= NW'(nf_c * WORDS_PER_FRAME);
            idx     <= '0;
            run_cnt <= cap_cycle;
            if (capture && cap_cycle == '0) begin
              dut_clk_dis <= 1'b1;
              state       <= S_STOPCLK;
            end else if (capture) begin
              state <= S_RUN;
            end else begin
              state <= S_CMD;
            end
          end
        end
        S_RUN: begin
          run_cnt <= run_cnt - 1'b1;
          if (run_cnt == 16'd1) begin
            dut_clk_dis <= 1'b1;
            state       <= S_STOPCLK;
          end
        end
        S_STOPCLK: begin
          idx <= idx + 1'b1;
          if (idx == CW'(STOP_WAIT - 1)) begin
            idx   <= '0;
            state <= S_CAP;
          end
        end
        S_CAP: begin
          cap   <= 1'b1;
          state <= S_CAPWAIT;
        end
        S_CAPWAIT: begin
          idx <= idx + 1'b1;
          if (idx == CW'(CAP_WAIT - 1)) begin
            idx   <= '0;
            state <= S_CMD;
          end
        end
        S_CMD: begin
          icap <= '{csib: 1'b0, rdwrb: 1'b0, data: bitswap(pre_word(idx, far_q, n_words))};
          idx  <= idx + 1'b1;
          if (idx == CW'(PRE_LEN - 1)) state <= S_SW_RD;
        end
        S_SW_RD: begin
          icap   <= '{csib: 1'b1, rdwrb: 1'b1, data: CFG_DUMMY};
          rd_cnt <= '0;
          state  <= S_READ;
        end
        S_READ: begin
          icap   <= '{csib: 1'b0, rdwrb: 1'b1, data: CFG_DUMMY};
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == n_words - 1'b1) state <= S_SW_WR;
        end
        S_SW_WR: begin
          icap <= '{csib: 1'b1, rdwrb: 1'b0, data: CFG_DUMMY};
          idx  <= '0;
          if (rx_cnt == n_words) state <= S_POST;
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

  // ---- receive side: words arrive RD_LAT cycles after the read cycle -----
  always_ff @(posedge clk) begin
    if (rst) begin
      rd_pipe <= '0;
      rx_cnt  <= '0;
    end else begin
      rd_pipe <= RD_LAT'({rd_pipe, (!icap.csib && icap.rdwrb)});
      if (state == S_IDLE)  rx_cnt <= '0;
      else if (rd_valid)    rx_cnt <= rx_cnt + 1'b1;
    end
  end

  assign rd_valid = rd_pipe[RD_LAT-1];
  assign rd_addr  = rx_cnt;
  assign rd_data  = icap_o;

  // RDWRB may only change while the port is deselected
  property p_rdwr_stable;
    @(posedge clk) disable iff (rst) $changed(icap.rdwrb) |-> icap.csib;
  endproperty
  a_rdwr_stable: assert property (p_rdwr_stable)
    else $error("read_frame: RDWRB changed while CSIB was low");

endmodule
