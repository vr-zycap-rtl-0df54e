// frame_bram: dual-port block RAM that holds read-back frames for a
// read-modify-write cycle.
//
// Port A is the write port, fed by the read-back stream (golden words,
// possibly modified on their way in). Port B is a synchronous read port used
// by the write FSM to replay the frames into the ICAP, and by the processor
// to inspect memory words. Both ports work on the same clock; a read returns
// the word one cycle after its address is presented. A read and a write of
// the same address in the same cycle return the old word.
//
// The default depth of 512 words holds five frames (505 words: four data
// frames and one dummy frame), the 16 Kb the source design allots to one LUT
// reconfiguration. The port arrangement and the read latency are this
// design's choice.
module frame_bram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A: write
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_din,
  // port B: read
  input  logic             b_en,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_din;
  end

  always_ff @(posedge clk) begin
    if (b_en) b_dout <= mem[b_addr];
  end

endmodule
