// slice2far: translate a slice/LUT location (XYBEL) into its place in the
// configuration memory.
//
// XYBEL packs the slice coordinates and the LUT: bits [31:17] hold X,
// bits [16:2] hold Y and bits [1:0] the BEL (0..3 = LUTA..LUTD). From them
// the module derives
//   * the frame address (FAR): block type 0 (CLB), the top/bottom bit and
//     the clock row from Y, the major column from X (X/2 + COL_BASE) and the
//     first minor frame of the LUT group (26 for odd X, 32 for even X);
//   * the word offset inside the frame: two words per slice row, with the
//     clock/ECC word in the middle of the frame skipped;
//   * which 16-bit half of that word holds the LUT (LUTB and LUTD high).
// Slices with Y >= Y_HALF are in the top half (top/bottom = 0) and their row
// is (Y - Y_HALF) / ROW_HEIGHT; slices below are in the bottom half, whose
// single row is numbered BOTTOM_ROW.
//
// Timing: start is sampled on a rising clock edge and the result, with
// valid, appears one cycle later (one cycle, as measured for the source
// design). Outputs hold until the next start.
//
// The field rules, the minor-frame ranges and the word layout follow the
// source design; the exact bit packing of XYBEL is derived from its worked
// example (0x006400C9 = X50 Y50 LUTB), and the linear column rule ignores
// non-CLB columns, which the design does not list.
module slice2far
  import vrz_pkg::*;
#(
  parameter int unsigned Y_HALF      = 50,  // slice rows in the bottom half
  parameter int unsigned ROW_HEIGHT  = 50,  // slice rows per clock row
  parameter int unsigned COL_BASE    = 2,   // major column of slices X0/X1
  parameter int unsigned BOTTOM_ROW  = 1,   // row number of the bottom half
  parameter int unsigned MINOR_ODD   = 26,  // first LUT frame, odd slices
  parameter int unsigned MINOR_EVEN  = 32   // first LUT frame, even slices
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] xybel,
  output logic        valid,
  output far_t        far,
  output logic [6:0]  word_off,
  output logic        hi_half
);

  logic [14:0] x, y;
  logic [1:0]  bel;
  assign x   = xybel[31:17];
  assign y   = xybel[16:2];
  assign bel = xybel[1:0];

  logic        top_c;
  logic [4:0]  row_c;
  logic [14:0] yrow_c;
  logic [6:0]  word_c;
  far_t        far_c;

  always_comb begin
    if (y >= 15'(Y_HALF)) begin
      top_c  = 1'b0;
      row_c  = 5'((y - 15'(Y_HALF)) / 15'(ROW_HEIGHT));
      yrow_c = 15'((y - 15'(Y_HALF)) % 15'(ROW_HEIGHT));
    end else begin
      top_c  = 1'b1;
      row_c  = 5'(BOTTOM_ROW);
      yrow_c = y;
    end
    // two words per slice row, the clock word sits after the lower 25 rows
    word_c = 7'(2 * yrow_c) + 7'(bel[1])
           + ((yrow_c >= 15'(ROW_HEIGHT / 2)) ? 7'd1 : 7'd0);

    far_c            = '0;
    far_c.block_type = 3'd0;
    far_c.top_bottom = top_c;
    far_c.row        = row_c;
    far_c.column     = 10'(x / 15'd2) + 10'(COL_BASE);
    far_c.minor      = x[0] ? 7'(MINOR_ODD) : 7'(MINOR_EVEN);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid    <= 1'b0;
      far      <= '0;
      word_off <= '0;
      hi_half  <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        far      <= far_c;
        word_off <= word_c;
        hi_half  <= bel[0];
      end
    end
  end

endmodule
