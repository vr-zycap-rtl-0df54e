// tb_vr_zycap: end-to-end test of the controller at its default parameters,
// connected to the behavioural ICAP/configuration-memory model with one
// user flip-flop.
//
// Runs every operation the processor can request and checks it against
// values computed here, independently of the RTL:
//   * read frame  (3 frames incl. dummy) then read BRAM of every word;
//   * write frame of the same block RAM contents to another address;
//   * DPR_LUT on the worked example and on random LUTs: the four frames of
//     the LUT group must equal their old contents with only the LUT's 16-bit
//     half replaced by the byte-swapped INIT words, and nothing else moves;
//   * DPR_FF on the model's flip-flop: the value captured with the clock
//     stopped must come back inverted after GSR, the clock must stay stopped
//     before CAP until after GSR, and run again afterwards; a second run
//     with cap_cycle = 37 must let the DUT run exactly 37 cycles longer
//     before the capture;
//   * an unused op_sel value, which must finish at once without touching
//     the ICAP;
//   * the cycle counts of each operation.
// Each mechanism (capture, GSR, clock stop, on-the-fly LUT and FF
// modification, pad frame, ICAP hand-over between the read and write FSMs)
// is counted, and one that never happened counts as a failure.
module tb_vr_zycap;
  import vrz_pkg::*;

  localparam logic [31:0] FF_FAR = 32'h0002_0E1F;   // frame 31 of column 28, top half, row 1
  localparam int unsigned FF_LOC = 3160;

  logic clk = 0, rst = 1, start = 0;
  logic [2:0] op_sel = '0, num_frames = '0;
  logic [31:0] start_addr = '0, xybel = '0;
  logic [63:0] init = '0;
  logic [11:0] bit_location = '0;
  logic [8:0] mem_addr = '0;
  logic [15:0] cap_cycle = '0;
  logic busy, done, icap_csib, icap_rdwrb, cap, gsr, dut_clk_en, ff_q;
  logic [31:0] bram_word, icap_i, icap_o;
  int checks = 0, failures = 0;

  vr_zycap dut (.clk, .rst, .start, .op_sel, .start_addr, .xybel, .init, .num_frames,
                .bit_location, .cap_cycle, .mem_addr, .busy, .done, .bram_word, .icap_csib, .icap_rdwrb,
                .icap_i, .icap_o, .cap, .gsr, .dut_clk_en);
  icap_cfg_model #(.FF_FAR(FF_FAR), .FF_LOC(FF_LOC)) model (
    .clk, .csib(icap_csib), .rdwrb(icap_rdwrb), .i(icap_i), .o(icap_o), .cap, .gsr,
    .dut_clk_en, .ff_q);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----------------------------------------------------
  int n_cap = 0, n_gsr = 0, n_clk_stop = 0, n_lut_mod = 0, n_ff_mod = 0, n_handover = 0;
  logic clk_en_q = 1'b1, wf_busy_q = 1'b0;
  bit ff_window = 0;
  int ran_before_cap = 0;
  always @(posedge clk) if (!rst) begin
    if (cap) n_cap++;
    if (ff_window && dut_clk_en) ran_before_cap++;
    if (gsr) n_gsr++;
    if (clk_en_q && !dut_clk_en) n_clk_stop++;
    clk_en_q <= dut_clk_en;
    if (dut.a_we && dut.lut_hit) n_lut_mod++;
    if (dut.a_we && dut.ff_hit) n_ff_mod++;
    if (dut.wf_busy && !wf_busy_q && dut.state == dut.S_WR && dut.op != OP_WRITE_FRAME) n_handover++;
    wf_busy_q <= dut.wf_busy;
  end

  // ---- helpers ---------------------------------------------------------------
  task automatic run_op(input logic [2:0] op, output int cycles);
    @(negedge clk);
    op_sel = op;
    start  = 1;
    @(negedge clk);
    start  = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic expect_cycles(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s took %0d cycles, expected %0d", what, got, exp);
    end else begin
      $display("%s: %0d cycles", what, got);
    end
  endtask

  function automatic logic [31:0] bram_of(input int a);
    return dut.u_frame_bram.mem[a];
  endfunction

  // reference translation of a slice location (three clock rows of 50 slices)
  function automatic logic [31:0] ref_far(input int x, input int y);
    int top, row;
    if (y < 50)       begin top = 1; row = 1; end
    else if (y < 100) begin top = 0; row = 0; end
    else              begin top = 0; row = 1; end
    return {6'd0, 3'd0, 1'(top), 5'(row), 10'(x / 2 + 2), 7'((x % 2 == 1) ? 26 : 32)};
  endfunction

  function automatic int ref_word(input int y, input int bel);
    int yr = y % 50;
    return (yr < 25) ? 2 * yr + bel / 2 : 2 * yr + 1 + bel / 2;
  endfunction

  // ---- the operations ----------------------------------------------------------
  task automatic test_read_write();
    int cyc, bad = 0, fs0;
    logic [31:0] f1 = 32'h0042_0F9A, f2 = 32'h0042_1000;
    start_addr = f1;
    num_frames = 3'd3;
    run_op(OP_READ_FRAME, cyc);
    expect_cycles("read frame, 2 data frames", cyc, 239 + 101 + 1);
    for (int a = 0; a < 303; a++) begin
      logic [31:0] e = (a < 101) ? (32'hD00D_0000 | 32'(a)) : model.peek(f1 + 32'((a - 101) / 101), (a - 101) % 101);
      int c2;
      mem_addr = 9'(a);
      run_op(OP_READ_BRAM, c2);
      if (bram_word !== e) begin
        bad++;
        if (bad < 5) $display("FAIL bram %0d = %h exp %h", a, bram_word, e);
      end
      if (a == 0) expect_cycles("read BRAM", c2, 2);
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL read frame/read BRAM: %0d words", bad); end
    // write those frames back elsewhere
    fs0 = model.frames_stored;
    start_addr = f2;
    run_op(OP_WRITE_FRAME, cyc);
    expect_cycles("write frame, 2 data frames", cyc, 237 + 101 + 1);
    bad = 0;
    for (int k = 0; k < 2; k++)
      for (int w = 0; w < 101; w++)
        if (model.peek(f2 + 32'(k), w) !== model.peek(f1 + 32'(k), w)) bad++;
    for (int w = 0; w < 101; w++) if (model.peek(f2 + 32'd2, w) !== model.init_word(f2 + 32'd2, w)) bad++;
    checks++;
    if (bad != 0 || model.frames_stored != fs0 + 2) begin
      failures++;
      $display("FAIL write frame: %0d words wrong, %0d frames stored", bad, model.frames_stored - fs0);
    end
  endtask

  task automatic test_lut(input int x, input int y, input int bel, input logic [63:0] v,
                          input bit check_time);
    logic [31:0] f = ref_far(x, y);
    int wd = ref_word(y, bel), cyc, bad = 0;
    logic [31:0] prev_w [6][101];
    logic [15:0] fwv [4];
    fwv[0] = {v[55:48], v[63:56]};
    fwv[1] = {v[39:32], v[47:40]};
    fwv[2] = {v[23:16], v[31:24]};
    fwv[3] = {v[7:0], v[15:8]};
    for (int k = -1; k < 5; k++)
      for (int w = 0; w < 101; w++) prev_w[k + 1][w] = model.peek(f + 32'(k), w);
    xybel = {15'(x), 15'(y), 2'(bel)};
    init  = v;
    run_op(OP_DPR_LUT, cyc);
    if (check_time) expect_cycles("DPR_LUT", cyc, 1084);
    for (int k = -1; k < 5; k++)
      for (int w = 0; w < 101; w++) begin
        logic [31:0] e = prev_w[k + 1][w];
        if (k >= 0 && k < 4 && w == wd) begin
          if (bel % 2 == 1) e[31:16] = fwv[k];
          else              e[15:0]  = fwv[k];
        end
        if (model.peek(f + 32'(k), w) !== e) begin
          bad++;
          if (bad < 5) $display("FAIL LUT X%0d Y%0d BEL%0d frame %0d word %0d: %h exp %h",
                                x, y, bel, k, w, model.peek(f + 32'(k), w), e);
        end
      end
    checks++;
    if (bad != 0) failures++;
  endtask

  task automatic test_ff(input int cc, output int ran);
    int cyc, bad = 0, stopped_toggles = 0;
    logic v, running_toggle;
    logic [31:0] prev_w [101];
    int wp = FF_LOC / 32 - 1, bp = FF_LOC % 32 - 1;
    repeat (7) @(negedge clk);
    start_addr   = FF_FAR;
    bit_location = 12'(FF_LOC);
    cap_cycle    = 16'(cc);
    ran_before_cap = 0;
    ff_window    = 1;
    fork
      run_op(OP_DPR_FF, cyc);
      begin
        logic last;
        @(posedge clk iff cap);
        ff_window = 0;
        v = ff_q;                               // value copied by CAPTURE
        for (int w = 0; w < 101; w++) prev_w[w] = model.peek(FF_FAR, w);
        prev_w[wp][bp] = v;
        last = ff_q;
        while (!gsr) begin
          @(posedge clk);
          #1;
          if (ff_q != last) stopped_toggles++;
          last = ff_q;
        end
        @(posedge clk);
        #1;
        checks++;
        if (ff_q !== ~v) begin failures++; $display("FAIL FF after GSR = %0d, captured %0d", ff_q, v); end
        checks++;
        if (dut_clk_en) begin failures++; $display("FAIL DUT clock running at GSR"); end
      end
    join
    ran = ran_before_cap;
    expect_cycles($sformatf("DPR_FF, cap_cycle %0d", cc), cyc, 487 + cc);
    checks++;
    if (stopped_toggles != 0) begin failures++; $display("FAIL FF moved while clock stopped"); end
    for (int w = 0; w < 101; w++) begin
      logic [31:0] e = prev_w[w];
      if (w == wp) e[bp] = ~e[bp];
      if (model.peek(FF_FAR, w) !== e) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL FF frame: %0d words wrong", bad); end
    running_toggle = ff_q;
    repeat (3) @(negedge clk);
    checks++;
    if (!dut_clk_en || ff_q == running_toggle) begin failures++; $display("FAIL DUT clock not restarted"); end
  endtask

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", name); end
    else $display("mechanism %-28s %0d", name, n);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    begin
      int c0, s0 = model.syncs;
      run_op(3'd7, c0);                                  // no such operation
      expect_cycles("unused op_sel", c0, 1);
      checks++;
      if (model.syncs != s0) begin failures++; $display("FAIL unused op_sel touched the ICAP"); end
    end
    test_read_write();
    test_lut(50, 50, 1, 64'h0123_4567_89AB_CDEF, 1);     // worked example X50Y50 LUTB
    test_lut(7, 24, 2, 64'hFFFF_0000_AAAA_5555, 0);
    test_lut(8, 25, 0, 64'h8000_0000_0000_0001, 0);
    test_lut(8, 25, 3, 64'hDEAD_BEEF_0BAD_F00D, 0);      // same slice, other LUT
    for (int n = 0; n < 4; n++)
      test_lut(int'($urandom_range(0, 60)), int'($urandom_range(0, 149)), int'($urandom_range(0, 3)),
               {$urandom, $urandom}, 0);
    begin
      int ran0, ran1;
      test_ff(0, ran0);
      test_ff(37, ran1);
      checks++;
      if (ran1 != ran0 + 37) begin
        failures++;
        $display("FAIL DUT ran %0d cycles before capture with cap_cycle 37, %0d with 0", ran1, ran0);
      end
    end
    checks++;
    if (model.errors != 0) begin failures++; $display("FAIL ICAP protocol errors: %0d", model.errors); end
    checks++;
    if (model.syncs != model.desyncs) begin failures++; $display("FAIL sessions left open"); end
    mech("ICAP sessions (sync..desync)", model.desyncs);
    mech("on-the-fly LUT word edits", n_lut_mod);
    mech("on-the-fly FF bit flips", n_ff_mod);
    mech("CAPTURE pulses", n_cap);
    mech("GSR pulses", n_gsr);
    mech("DUT clock stops", n_clk_stop);
    mech("read-to-write ICAP hand-overs", n_handover);
    mech("pad frames held back", model.pads_dropped);
    checks++;
    if (n_lut_mod != 8 * 4 || n_ff_mod != 2 || n_cap != 2 || n_gsr != 2) begin
      failures++;
      $display("FAIL mechanism counts lut=%0d ff=%0d cap=%0d gsr=%0d", n_lut_mod, n_ff_mod, n_cap, n_gsr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
