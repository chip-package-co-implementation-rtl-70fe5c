// des_chip: one DES processor chip. A 16-stage DES pipeline encrypts or
// decrypts one 64-bit block per clock, with a new key and direction for
// every block, and a self-test system surrounds it.
//
// Data path, every clock (scanmode = 0):
//   - input_mux passes either the 64 input pads (pads = 1) or the data PRNG
//     (pads = 0) to the pipeline;
//   - the two 28-bit key PRNGs supply the key halves C0 and D0 of that block
//     (there is no key input from the pads);
//   - opmode (0 = encrypt, 1 = decrypt) travels down the pipeline with it;
//   - 16 clocks later the result is on data_out and, in the same clock, is
//     folded into the 16-bit signature analyzer (SAR), which hashes the
//     16-bit output group chosen by select.
// Test: with scanmode = 1 every register of the chip shifts along one of
// seven chains (pipeline data/opmode, pipeline key C, pipeline key D, data
// PRNG, key PRNG 1, key PRNG 2, SAR); each chain has its own serial input
// and output in scan_in / scan_out. Seeds and polynomials are loaded this
// way, the pipeline is initialised, and the signature is read back at the
// end of a run. There is no reset pin.
//
// The block structure and the signal names follow the chip's block diagram;
// a single scanmode for all chains, the opmode polarity and the PRNG scan
// outputs are this design's choices.
module des_chip
  import des_pkg::*;
(
  input  logic       clk,
  input  block_t     pads_data,
  input  logic       pads,
  input  logic       opmode,
  input  logic [1:0] select,
  input  logic       scanmode,
  input  chip_scan_t scan_in,
  output block_t     data_out,
  output chip_scan_t scan_out,
  output logic [15:0] signature
);

  block_t prng_data, pipe_in;
  khalf_t key_c, key_d;

  lfsr_prng #(.WIDTH(BLOCK_W)) u_data_prng (
    .clk(clk), .scanmode(scanmode),
    .scan_in(scan_in.data_prng), .scan_out(scan_out.data_prng), .q(prng_data));

  lfsr_prng #(.WIDTH(KHALF_W)) u_key_prng1 (
    .clk(clk), .scanmode(scanmode),
    .scan_in(scan_in.key_prng1), .scan_out(scan_out.key_prng1), .q(key_c));

  lfsr_prng #(.WIDTH(KHALF_W)) u_key_prng2 (
    .clk(clk), .scanmode(scanmode),
    .scan_in(scan_in.key_prng2), .scan_out(scan_out.key_prng2), .q(key_d));

  input_mux #(.WIDTH(BLOCK_W)) u_input_mux (
    .pads(pads), .prng_data(prng_data), .pad_data(pads_data), .dout(pipe_in));

  des_pipeline u_pipeline (
    .clk           (clk),
    .scanmode      (scanmode),
    .din           (pipe_in),
    .key_c         (key_c),
    .key_d         (key_d),
    .opmode        (opmode),
    .dout          (data_out),
    .scan_in_data  (scan_in.datapipe),
    .scan_in_key1  (scan_in.key1),
    .scan_in_key2  (scan_in.key2),
    .scan_out_data (scan_out.datapipe),
    .scan_out_key1 (scan_out.key1),
    .scan_out_key2 (scan_out.key2)
  );

  sar #(.WIDTH(16), .GROUPS(4)) u_sar (
    .clk(clk), .scanmode(scanmode), .select(select), .din(data_out),
    .scan_in(scan_in.sar), .scan_out(scan_out.sar), .signature(signature));

endmodule
