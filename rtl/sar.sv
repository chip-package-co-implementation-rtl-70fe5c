// sar: signature analyzer register that compresses the pipeline output into
// a 16-bit signature for self test.
//
// The 64-bit output is seen as GROUPS = 4 groups of WIDTH = 16 bits; select
// picks one (0 = the most significant bits, DES bits 1..16; 3 = DES bits
// 49..64). Every clock with scanmode = 0 the register takes one Galois LFSR
// step with its programmable polynomial and XORs in the selected group:
//   sig <= (sig >> 1) ^ (sig[0] ? poly : 0) ^ group
// (a multiple-input signature register). Hashing all 64 bits takes four
// runs, one per select value. With scanmode = 1 the 2*WIDTH bits
// {sig, poly} shift towards the MSB, scan_in entering poly[0] and sig's MSB
// leaving on scan_out, so the signature comes out first, MSB first, while
// the next seed and polynomial go in (seed bits first).
//
// The 16-bit length, the four multiplexed groups and the programmable LFSR
// follow the chip; the MISR form, the group order and the chain order are
// this design's choice.
module sar #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned GROUPS = 4
) (
  input  logic                      clk,
  input  logic                      scanmode,
  input  logic [$clog2(GROUPS)-1:0] select,
  input  logic [WIDTH*GROUPS-1:0]   din,
  input  logic                      scan_in,
  output logic                      scan_out,
  output logic [WIDTH-1:0]          signature
);

  logic [WIDTH-1:0] sig, poly, group;

  always_comb group = din[WIDTH*(GROUPS-1-int'(select)) +: WIDTH];

  always_ff @(posedge clk) begin
    if (scanmode) {sig, poly} <= {sig[WIDTH-2:0], poly, scan_in};
    else          sig <= (sig >> 1) ^ (sig[0] ? poly : '0) ^ group;
  end

  assign signature = sig;
  assign scan_out  = sig[WIDTH-1];

endmodule
