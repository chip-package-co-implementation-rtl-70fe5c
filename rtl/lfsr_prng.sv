// lfsr_prng: programmable pseudo-random vector generator for the chip's
// self test: the data PRNG (WIDTH = 64) and the two key PRNGs (WIDTH = 28,
// one per key half).
//
// A Galois linear-feedback shift register: every clock with scanmode = 0 the
// state moves one place towards bit 0 and, if the bit shifted out was 1, is
// XORed with the feedback polynomial:
//   state <= (state >> 1) ^ (state[0] ? poly : 0)
// q is the state itself, so a new WIDTH-bit vector is offered every clock.
// Both the seed (state) and the polynomial are registers on a scan chain:
// with scanmode = 1 the 2*WIDTH bits {poly, state} shift one place towards
// the MSB, scan_in entering state[0] and poly[WIDTH-1] leaving on scan_out.
// After 2*WIDTH shifts the first bit shifted in sits in poly[WIDTH-1].
//
// That seed and polynomial are programmable by scan follows the chip; the
// Galois form, one step per clock and the chain order are this design's.
module lfsr_prng #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             scanmode,
  input  logic             scan_in,
  output logic             scan_out,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] state, poly;

  always_ff @(posedge clk) begin
    if (scanmode) {poly, state} <= {poly[WIDTH-2:0], state, scan_in};
    else          state <= (state >> 1) ^ (state[0] ? poly : '0);
  end

  assign q        = state;
  assign scan_out = poly[WIDTH-1];

endmodule
