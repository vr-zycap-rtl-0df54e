// tb_frame_bram: self-checking test of the dual-port frame memory. Fills all
// 512 words with random data through port A, reads them back through port B
// with one cycle of latency, and checks read-during-write returns the old
// word and that b_en low holds the output.
module tb_frame_bram;
  logic clk = 0;
  logic a_we = 0, b_en = 0;
  logic [8:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_din = '0, b_dout;
  logic [31:0] ref_mem [512];
  int checks = 0, failures = 0;

  frame_bram dut (.clk, .a_we, .a_addr, .a_din, .b_en, .b_addr, .b_dout);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      a_we = 1; a_addr = 9'(a); a_din = $urandom; ref_mem[a] = a_din;
    end
    @(negedge clk);
    a_we = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      b_en = 1; b_addr = 9'(a ^ 9'h0A5);
      @(negedge clk);
      b_en = 0;
      checks++;
      if (b_dout !== ref_mem[a ^ 9'h0A5]) begin
        failures++;
        $display("FAIL addr %0d: %h exp %h", a ^ 9'h0A5, b_dout, ref_mem[a ^ 9'h0A5]);
      end
      @(negedge clk);
      checks++;
      if (b_dout !== ref_mem[a ^ 9'h0A5]) begin failures++; $display("FAIL hold"); end
    end
    // read during write of the same address returns the old word
    @(negedge clk);
    a_we = 1; a_addr = 9'd7; a_din = ~ref_mem[7]; b_en = 1; b_addr = 9'd7;
    @(negedge clk);
    a_we = 0;
    checks++;
    if (b_dout !== ref_mem[7]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++;
    if (b_dout !== ~ref_mem[7]) begin failures++; $display("FAIL new word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
