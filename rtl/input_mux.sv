// input_mux: chooses where the DES pipeline's data comes from each clock:
// the input pads (pads = 1) or the on-chip data PRNG (pads = 0).
// Combinational. Choosing between the pads and the PRNG follows the chip;
// the polarity of the pads signal is this design's choice.
module input_mux #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             pads,
  input  logic [WIDTH-1:0] prng_data,
  input  logic [WIDTH-1:0] pad_data,
  output logic [WIDTH-1:0] dout
);

  always_comb dout = pads ? pad_data : prng_data;

endmodule
