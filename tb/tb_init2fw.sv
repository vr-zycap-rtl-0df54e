// tb_init2fw: self-checking test of the INIT to frame word split.
// Drives 300 random INIT values (and two fixed ones), rebuilds every frame
// word byte by byte from the byte-swap table and checks the one-cycle
// latency.
module tb_init2fw;
  logic clk = 0, rst = 1, start = 0;
  logic [63:0] init;
  logic valid;
  logic [15:0] fw [4];
  int checks = 0, failures = 0;

  init2fw dut (.clk, .rst, .start, .init, .valid, .fw);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] v);
    logic [7:0] b [8];
    logic [15:0] exp [4];
    for (int k = 0; k < 8; k++) b[k] = v[8*k +: 8];   // b[7] = INIT[63:56]
    exp[0] = {b[6], b[7]};
    exp[1] = {b[4], b[5]};
    exp[2] = {b[2], b[3]};
    exp[3] = {b[0], b[1]};
    @(negedge clk);
    init  = v;
    start = 1;
    @(negedge clk);
    start = 0;
    init  = ~v;          // must not disturb the held result
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (!valid || fw[k] !== exp[k]) begin
        failures++;
        $display("FAIL init=%h fw%0d=%h exp=%h", v, k, fw[k], exp[k]);
      end
    end
    @(negedge clk);
    checks++;
    if (valid || fw[0] !== exp[0]) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    run(64'h0123_4567_89AB_CDEF);
    run(64'hFF00_0000_0000_00AA);
    for (int n = 0; n < 300; n++) run({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
