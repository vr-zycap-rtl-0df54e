// tb_read_frame: self-checking test of the ICAP read-back FSM against the
// behavioural ICAP/configuration-memory model.
// Reads one frame (plus the dummy frame), then four frames (plus dummy),
// a request for seven frames (cut to the five that fit), a request for
// zero frames (read as the dummy frame alone),
// then one frame with capture at once and one with capture after the DUT
// has run 20 more cycles; checks every streamed word and its address,
// the cycle count from start to done (239 for one frame, +101 per extra
// frame), the session (one sync and one desync per read, no protocol
// errors), and in capture mode that the DUT clock is stopped before the
// single CAP pulse and stays stopped until released, and that cap_cycle
// adds exactly that many running DUT clock cycles before the capture.
module tb_read_frame;
  import vrz_pkg::*;
  logic clk = 0, rst = 1, start = 0, capture = 0, clk_release = 0;
  logic [15:0] cap_cycle = '0;
  logic [31:0] far;
  logic [2:0] num_frames;
  logic busy, done, rd_valid, cap, dut_clk_dis, ff_q;
  logic [8:0] rd_addr;
  logic [31:0] rd_data, icap_o;
  icap_req_t icap;
  int checks = 0, failures = 0;

  read_frame dut (.clk, .rst, .start, .far, .num_frames, .capture, .cap_cycle, .clk_release, .busy, .done,
                  .icap, .icap_o, .rd_valid, .rd_addr, .rd_data, .cap, .dut_clk_dis);
  icap_cfg_model #(.FF_FAR(32'h0000_1234), .FF_LOC(3160)) model (
    .clk, .csib(icap.csib), .rdwrb(icap.rdwrb), .i(icap.data), .o(icap_o),
    .cap, .gsr(1'b0), .dut_clk_en(!dut_clk_dis), .ff_q);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expected(input logic [31:0] f, input int a);
    if (a < 101) return 32'hD00D_0000 | 32'(a);
    return model.peek(f + 32'((a - 101) / 101), (a - 101) % 101);
  endfunction

  int n_rx, bad_rx, cyc, caps, cap_running, run_before_cap;
  bit  in_op = 0;
  always @(posedge clk) begin
    if (rd_valid) begin
      if (rd_addr != 9'(n_rx) || rd_data !== expected(far, n_rx)) begin
        bad_rx++;
        if (bad_rx < 5) $display("FAIL word %0d addr %0d: %h exp %h", n_rx, rd_addr, rd_data,
                                 expected(far, n_rx));
      end
      n_rx++;
    end
    if (in_op && caps == 0 && !dut_clk_dis) run_before_cap++;
    if (cap) begin
      caps++;
      if (!dut_clk_dis) cap_running++;
    end
  end

  // nf: frames expected to be read; req: num_frames requested (-1: nf)
  task automatic do_read(input logic [31:0] f, input int nf, input bit capt, input int exp_cyc,
                         input int req = -1);
    int s0 = model.syncs, d0 = model.desyncs;
    n_rx = 0; bad_rx = 0; caps = 0; cap_running = 0; run_before_cap = 0;
    @(negedge clk);
    far = f; num_frames = 3'((req < 0) ? nf : req); capture = capt; start = 1;
    cyc = 0;
    @(negedge clk);
    start = 0;
    in_op = 1;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    in_op = 0;
    checks++;
    if (n_rx != nf * 101 || bad_rx != 0) begin
      failures++;
      $display("FAIL nf=%0d: %0d words, %0d wrong", nf, n_rx, bad_rx);
    end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL nf=%0d cycles %0d exp %0d", nf, cyc, exp_cyc); end
    else $display("read of %0d frames: %0d cycles", nf, cyc);
    checks++;
    if (model.syncs != s0 + 1 || model.desyncs != d0 + 1 || model.errors != 0) begin
      failures++;
      $display("FAIL session: syncs %0d desyncs %0d errors %0d", model.syncs - s0,
               model.desyncs - d0, model.errors);
    end
    checks++;
    if (caps != (capt ? 1 : 0) || cap_running != 0) begin
      failures++;
      $display("FAIL capture pulses %0d (while running %0d)", caps, cap_running);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    do_read(32'h0042_0F9A, 2, 0, 239);
    do_read(32'h0002_0E20, 5, 0, 239 + 3 * 101);
    do_read(32'h0002_0E20, 5, 0, 239 + 3 * 101, 7);      // more than fits: cut to 5
    do_read(32'h0002_0E20, 1, 0, 239 - 101, 0);          // 0 is taken as the dummy frame only
    do_read(32'h0000_1234, 2, 1, 239 + 2 + 1 + 2);
    checks++;
    if (run_before_cap != 0) begin failures++; $display("FAIL DUT ran %0d cycles before capture", run_before_cap); end
    // after capture the clock stays stopped until released
    checks++;
    if (!dut_clk_dis) begin failures++; $display("FAIL clock restarted early"); end
    checks++;
    if (model.captures != 1) begin failures++; $display("FAIL model captures %0d", model.captures); end
    @(negedge clk);
    clk_release = 1;
    @(negedge clk);
    clk_release = 0;
    checks++;
    if (dut_clk_dis) begin failures++; $display("FAIL clock not released"); end
    // capture at a chosen cycle: the DUT keeps running for cap_cycle cycles
    cap_cycle = 16'd20;
    do_read(32'h0000_1234, 2, 1, 239 + 20 + 2 + 1 + 2);
    checks++;
    if (run_before_cap != 20) begin failures++; $display("FAIL DUT ran %0d cycles before capture, exp 20", run_before_cap); end
    checks++;
    if (model.captures != 2) begin failures++; $display("FAIL model captures %0d", model.captures); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
