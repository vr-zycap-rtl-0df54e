// bit_translation: locate a flip-flop's state bit inside a configuration
// frame.
//
// The bit location of a flip-flop, taken from the logic allocation file,
// counts bits across the 101 x 32 = 3232 bits of a frame (0..3231). The
// module turns it into a word position and a bit position inside that word
// using the rule of the source design,
//     word_pos = bit_location / 32 - 1,   bit_pos = bit_location % 32 - 1,
// so that bit location 3160 gives word 97, bit 23. Both results wrap in
// their own width (a bit_location % 32 of 0 gives bit 31), which this design
// chooses; locations below 32 are flagged in_range = 0.
//
// Timing: start is sampled on a rising edge; results and valid appear one
// cycle later (one cycle, as measured for the source design).
module bit_translation (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [11:0] bit_location,
  output logic        valid,
  output logic [6:0]  word_pos,
  output logic [4:0]  bit_pos,
  output logic        in_range
);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid    <= 1'b0;
      word_pos <= '0;
      bit_pos  <= '0;
      in_range <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        word_pos <= 7'(bit_location[11:5]) - 7'd1;
        bit_pos  <= bit_location[4:0] - 5'd1;
        in_range <= (bit_location >= 12'd32) && (bit_location < 12'd3232);
      end
    end
  end

endmodule
