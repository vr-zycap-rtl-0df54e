// tb_slice2far: self-checking test of the XYBEL to frame address translation.
// Checks the worked example X50 Y50 LUTB (XYBEL 0x006400C9) and 400 random
// slice locations of a three-row device against a reference written from
// the rules (three Y bands, two words per slice row, clock word skipped),
// and checks the one-cycle latency.
module tb_slice2far;
  import vrz_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [31:0] xybel;
  logic valid, hi_half;
  far_t far;
  logic [6:0] word_off;
  int checks = 0, failures = 0;

  slice2far dut (.clk, .rst, .start, .xybel, .valid, .far, .word_off, .hi_half);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int x, input int y, input int bel);
    int top, row, yr, word, col, minor;
    if (y < 50)       begin top = 1; row = 1; yr = y;       end
    else if (y < 100) begin top = 0; row = 0; yr = y - 50;  end
    else              begin top = 0; row = 1; yr = y - 100; end
    word  = (yr < 25) ? 2 * yr + bel / 2 : 2 * yr + 1 + bel / 2;
    col   = x / 2 + 2;
    minor = (x % 2 == 1) ? 26 : 32;
    @(negedge clk);
    xybel = {15'(x), 15'(y), 2'(bel)};
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!valid || far.top_bottom != 1'(top) || far.row != 5'(row) || far.column != 10'(col)
        || far.minor != 7'(minor) || far.block_type != 0 || far.reserved != 0
        || word_off != 7'(word) || hi_half != 1'(bel % 2)) begin
      failures++;
      $display("FAIL X%0d Y%0d BEL%0d: got top=%0d row=%0d col=%0d minor=%0d word=%0d hi=%0d v=%0d",
               x, y, bel, far.top_bottom, far.row, far.column, far.minor, word_off, hi_half, valid);
    end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // worked example
    @(negedge clk);
    xybel = 32'h0064_00C9;
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (far.top_bottom !== 1'b0 || far.row !== 5'd0 || far.minor !== 7'd32 || word_off !== 7'd0
        || hi_half !== 1'b1 || far.column !== 10'd27) begin
      failures++;
      $display("FAIL example");
    end
    check(0, 0, 0);
    check(1, 0, 3);
    check(3, 24, 2);
    check(2, 25, 0);
    check(5, 49, 3);
    check(6, 99, 1);
    check(7, 100, 2);
    check(9, 149, 3);
    for (int n = 0; n < 400; n++) check(int'($urandom_range(0, 227)), int'($urandom_range(0, 149)),
                                        int'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
