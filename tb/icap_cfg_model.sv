// icap_cfg_model: behavioural model (not synthesizable) of the ICAPE2 port,
// the configuration memory behind it, and the CAPTURE/STARTUP effects on
// one user flip-flop. Used only by testbenches.
//
// Port behaviour: words presented with CSIB = 0, RDWRB = 0 are taken on the
// rising clock edge. Outside frame data they are bit-swapped back and parsed
// as configuration packets: the sync word opens a session, type-1 packets
// write FAR, CMD and IDCODE or select FDRI/FDRO, type-2 packets carry the
// word count of a frame write or read, CMD=DESYNC closes the session. Frame
// data for FDRI are taken as sent. A frame is written into memory only when
// the next complete frame has arrived, so the last frame of a write (the pad
// frame) is never stored. With CSIB = 0, RDWRB = 1 the model returns the
// FDRO words on o one cycle later: one dummy frame first, then the frames
// from FAR upwards. Memory words never written read as a fixed pattern of
// their address (init_word).
//
// The user flip-flop ff_q toggles on every clock while dut_clk_en is high.
// cap copies ff_q into its configuration bit (frame FF_FAR, bit location
// FF_LOC translated by word = loc/32 - 1, bit = loc%32 - 1); gsr loads ff_q
// from that bit. Protocol violations are counted in errors.
module icap_cfg_model
  import vrz_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h0372_7093,
  parameter logic [31:0] FF_FAR = 32'h0000_0000,
  parameter int unsigned FF_LOC = 0
) (
  input  logic        clk,
  input  logic        csib,
  input  logic        rdwrb,
  input  logic [31:0] i,
  output logic [31:0] o,
  input  logic        cap,
  input  logic        gsr,
  input  logic        dut_clk_en,
  output logic        ff_q
);

  logic [31:0] mem [longint];

  // counters visible to the testbench
  int errors = 0, syncs = 0, desyncs = 0, frames_stored = 0, words_read = 0;
  int captures = 0, gsrs = 0, idcode_ok = 0, starts = 0, pads_dropped = 0;
  logic [31:0] far = '0;

  logic        synced = 1'b0;
  logic [4:0]  t1_reg = '0, sel_reg = '0;
  int          t1_left = 0, fdri_left = 0, fdro_left = 0, fdro_idx = 0;
  logic [31:0] fbuf [WORDS_PER_FRAME];
  logic [31:0] pend [WORDS_PER_FRAME];
  int          widx = 0;
  bit          have_pend = 0;
  logic [31:0] wfar = '0, rfar = '0;
  logic        rdwrb_q = 1'b0, csib_q = 1'b1;

  initial begin
    o    = '0;
    ff_q = 1'b0;
  end

  function automatic longint key(input logic [31:0] f, input int w);
    return (longint'(f[25:0]) << 7) | longint'(w);
  endfunction

  function automatic logic [31:0] init_word(input logic [31:0] f, input int w);
    return {f[15:0], 16'(w)} ^ 32'h5A3C_96E1;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] f, input int w);
    longint k = key(f, w);
    if (mem.exists(k)) return mem[k];
    return init_word(f, w);
  endfunction

  function automatic void poke(input logic [31:0] f, input int w, input logic [31:0] d);
    mem[key(f, w)] = d;
  endfunction

  function automatic int ff_word();
    return FF_LOC / 32 - 1;
  endfunction

  function automatic int ff_bit();
    return (FF_LOC % 32 + 31) % 32;
  endfunction

  task automatic take_word(input logic [31:0] raw);
    logic [31:0] w;
    if (fdri_left > 0) begin
      fbuf[widx] = raw;
      widx++;
      fdri_left--;
      if (widx == WORDS_PER_FRAME) begin
        if (have_pend) begin
          for (int k = 0; k < WORDS_PER_FRAME; k++) poke(wfar, k, pend[k]);
          frames_stored++;
          wfar = wfar + 1;
        end
        for (int k = 0; k < WORDS_PER_FRAME; k++) pend[k] = fbuf[k];
        have_pend = 1;
        widx = 0;
      end
      return;
    end
    w = bitswap(raw);
    if (!synced) begin
      if (w == CFG_SYNC) begin
        synced = 1'b1;
        syncs++;
      end
      return;
    end
    if (t1_left > 0) begin
      t1_left--;
      case (t1_reg)
        REG_FAR:    far = w;
        REG_IDCODE: if (w == IDCODE) idcode_ok++; else errors++;
        REG_CMD: begin
          if (w == CMD_DESYNC) begin
            synced = 1'b0;
            desyncs++;
            if (have_pend) pads_dropped++;
            have_pend = 0;
          end
          if (w == CMD_START) starts++;
        end
        default: ;
      endcase
      return;
    end
    case (w[31:29])
      3'b001: begin
        if (w[28:27] == 2'b10) begin
          t1_reg  = w[17:13];
          sel_reg = w[17:13];
          t1_left = (w[17:13] == REG_FDRI || w[17:13] == REG_FDRO) ? 0 : int'(w[10:0]);
        end else if (w[28:27] == 2'b01) begin
          sel_reg = w[17:13];
        end
      end
      3'b010: begin
        if (w[28:27] == 2'b10 && sel_reg == REG_FDRI) begin
          fdri_left = int'(w[26:0]);
          widx      = 0;
          have_pend = 0;
          wfar      = far;
        end else if (w[28:27] == 2'b01 && sel_reg == REG_FDRO) begin
          fdro_left = int'(w[26:0]);
          fdro_idx  = 0;
          rfar      = far;
        end else begin
          errors++;
        end
      end
      default: if (w != CFG_DUMMY) errors++;
    endcase
  endtask

  always @(posedge clk) begin
    // RDWRB may only change while the port is deselected
    if (rdwrb != rdwrb_q && !csib && !csib_q) errors++;
    rdwrb_q <= rdwrb;
    csib_q  <= csib;

    if (!csib && !rdwrb) begin
      take_word(i);
    end else if (!csib && rdwrb) begin
      if (fdro_left == 0 || !synced) begin
        errors++;
        o <= 32'h0000_0000;
      end else begin
        if (fdro_idx < WORDS_PER_FRAME)
          o <= 32'hD00D_0000 | 32'(fdro_idx);   // leading dummy frame
        else
          o <= peek(rfar + 32'((fdro_idx - WORDS_PER_FRAME) / WORDS_PER_FRAME),
                    (fdro_idx - WORDS_PER_FRAME) % WORDS_PER_FRAME);
        fdro_idx++;
        fdro_left--;
        words_read++;
      end
    end

    // user flip-flop with capture (to shadow/config bit) and GSR (from it)
    if (cap) begin
      logic [31:0] cw;
      if (dut_clk_en) errors++;              // clock must be stopped first
      cw = peek(FF_FAR, ff_word());
      cw[ff_bit()] = ff_q;
      poke(FF_FAR, ff_word(), cw);
      captures++;
    end
    if (gsr) begin
      logic [31:0] gw;
      gw = peek(FF_FAR, ff_word());
      ff_q <= gw[ff_bit()];
      gsrs++;
    end else if (dut_clk_en) begin
      ff_q <= ~ff_q;
    end
  end

endmodule
