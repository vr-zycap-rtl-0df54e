// tb_write_frame: self-checking test of the ICAP frame write FSM with a
// frame_bram as its source and the behavioural ICAP/configuration-memory
// model as its sink. Writes one frame, four frames, two frames, a request
// for seven frames (cut to the four that fit) and a pad-only write of
// random data;
// checks that configuration memory holds exactly the block RAM words, that
// the pad frame is not stored and the next frame is untouched, the IDCODE,
// START, sync and desync commands, and the cycle count from start to done
// (237 for one frame, +101 per extra frame).
module tb_write_frame;
  import vrz_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [31:0] far;
  logic [2:0] num_frames;
  logic [8:0] base;
  logic busy, done, b_en, ff_q;
  logic [8:0] b_addr;
  logic [31:0] b_dout, icap_o;
  logic a_we = 0;
  logic [8:0] a_addr = '0;
  logic [31:0] a_din = '0;
  icap_req_t icap;
  logic [31:0] ref_mem [512];
  int checks = 0, failures = 0;

  write_frame dut (.clk, .rst, .start, .far, .num_frames, .base, .busy, .done, .icap,
                   .b_en, .b_addr, .b_dout);
  frame_bram bram (.clk, .a_we, .a_addr, .a_din, .b_en, .b_addr, .b_dout);
  icap_cfg_model model (.clk, .csib(icap.csib), .rdwrb(icap.rdwrb), .i(icap.data), .o(icap_o),
                        .cap(1'b0), .gsr(1'b0), .dut_clk_en(1'b0), .ff_q);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nf: frames expected to be written; req: num_frames requested (-1: nf)
  task automatic do_write(input logic [31:0] f, input int nf, input int b, input int exp_cyc,
                          input int req = -1);
    int cyc, bad = 0;
    int s0 = model.syncs, d0 = model.desyncs, id0 = model.idcode_ok, st0 = model.starts;
    int fs0 = model.frames_stored;
    logic [31:0] next_before [101];
    for (int w = 0; w < 101; w++) next_before[w] = model.peek(f + 32'(nf), w);
    for (int a = b; a < b + nf * 101; a++) begin
      @(negedge clk);
      a_we = 1; a_addr = 9'(a); a_din = $urandom; ref_mem[a] = a_din;
    end
    @(negedge clk);
    a_we = 0;
    far = f; num_frames = 3'((req < 0) ? nf : req); base = 9'(b); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    for (int k = 0; k < nf; k++)
      for (int w = 0; w < 101; w++)
        if (model.peek(f + 32'(k), w) !== ref_mem[b + k * 101 + w]) begin
          bad++;
          if (bad < 5) $display("FAIL frame %0d word %0d: %h exp %h", k, w,
                                model.peek(f + 32'(k), w), ref_mem[b + k * 101 + w]);
        end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d words differ", bad); end
    checks++;
    if (model.frames_stored != fs0 + nf) begin
      failures++;
      $display("FAIL frames stored %0d exp %0d", model.frames_stored - fs0, nf);
    end
    bad = 0;
    for (int w = 0; w < 101; w++) if (model.peek(f + 32'(nf), w) !== next_before[w]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL frame after the last one changed"); end
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("FAIL nf=%0d cycles %0d exp %0d", nf, cyc, exp_cyc); end
    else $display("write of %0d frames: %0d cycles", nf, cyc);
    checks++;
    if (model.syncs != s0 + 1 || model.desyncs != d0 + 1 || model.idcode_ok != id0 + 1
        || model.starts != st0 + 1 || model.errors != 0) begin
      failures++;
      $display("FAIL session: syncs %0d desyncs %0d idcode %0d start %0d errors %0d",
               model.syncs - s0, model.desyncs - d0, model.idcode_ok - id0, model.starts - st0,
               model.errors);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    do_write(32'h0042_0F9F, 1, 101, 237);
    do_write(32'h0002_0E20, 4, 101, 237 + 3 * 101);
    do_write(32'h0002_0E00, 2, 0, 237 + 101);
    do_write(32'h0002_0F00, 4, 101, 237 + 3 * 101, 7);   // more than fits: cut to 4
    do_write(32'h0002_0F80, 0, 101, 237 - 101);          // pad frame only
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
