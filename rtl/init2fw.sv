// init2fw: split a 64-bit LUT INIT value into the four 16-bit frame words
// that hold it, one per configuration frame of the LUT group.
//
// The INIT value is cut into eight bytes; each pair of bytes becomes one
// frame word with its two bytes exchanged:
//   frame word 0 = {INIT[55:48], INIT[63:56]}
//   frame word 1 = {INIT[39:32], INIT[47:40]}
//   frame word 2 = {INIT[23:16], INIT[31:24]}
//   frame word 3 = {INIT[7:0],   INIT[15:8]}
// Frame word k is placed into the k-th data frame read for the LUT.
//
// Timing: start is sampled on a rising edge; the words and valid appear one
// cycle later (the one cycle measured for the source design) and hold until
// the next start.
//
// The byte grouping and the swap follow the source design; assigning frame
// word k to the k-th minor frame of the group is this design's reading.
module init2fw (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [63:0] init,
  output logic        valid,
  output logic [15:0] fw [4]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      for (int k = 0; k < 4; k++) fw[k] <= '0;
    end else begin
      valid <= start;
      if (start) begin
        for (int k = 0; k < 4; k++) begin
          // bytes (63-16k .. 56-16k) and (55-16k .. 48-16k), exchanged
          fw[k] <= {init[63-16*k-8 -: 8], init[63-16*k -: 8]};
        end
      end
    end
  end

endmodule
