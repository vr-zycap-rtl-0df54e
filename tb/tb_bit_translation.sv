// tb_bit_translation: self-checking test of the flip-flop bit location to
// word/bit position translation. Checks the worked example (3160 gives
// word 97, bit 23), the ends of the range and 500 random locations against
// the rule word = loc/32 - 1, bit = loc%32 - 1, plus the one-cycle latency.
module tb_bit_translation;
  logic clk = 0, rst = 1, start = 0;
  logic [11:0] bit_location;
  logic valid, in_range;
  logic [6:0] word_pos;
  logic [4:0] bit_pos;
  int checks = 0, failures = 0;

  bit_translation dut (.clk, .rst, .start, .bit_location, .valid, .word_pos, .bit_pos, .in_range);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int loc);
    int ew, eb;
    ew = (loc / 32 - 1 + 128) % 128;
    eb = (loc % 32 - 1 + 32) % 32;
    @(negedge clk);
    bit_location = 12'(loc);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!valid || word_pos != 7'(ew) || bit_pos != 5'(eb) || in_range != (loc >= 32 && loc < 3232)) begin
      failures++;
      $display("FAIL loc=%0d word=%0d bit=%0d (exp %0d %0d)", loc, word_pos, bit_pos, ew, eb);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(3160);
    checks++;
    if (word_pos != 97 || bit_pos != 23) begin failures++; $display("FAIL example"); end
    run(32); run(33); run(63); run(3231); run(5);
    for (int n = 0; n < 500; n++) run(int'($urandom_range(0, 3231)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
