// mcm_3des: the triple-DES module: N_CHIPS = 3 DES chips (A, B, C) on one
// substrate, wired end to end so a block passes through three DES
// operations at the full rate of one 64-bit block per clock.
//
// data_in drives chip A's input pads; chip A's output drives chip B's pads
// and chip B's output drives chip C's pads. For triple DES, chips B and C
// are run with pads = 1, and the three opmode pins choose the direction of
// each pass (encrypt-decrypt-encrypt for standard 3DES encryption,
// decrypt-encrypt-decrypt for its inverse). Each chip has its own keys
// (from its key PRNGs) and its own control and scan pins, so each can also
// be run alone on its PRNG data. A block entering chip A appears on
// data_out[N_CHIPS-1] 16*N_CHIPS = 48 clocks later. data_out[i] is chip i's
// output (0 = A); signature[i] is chip i's SAR state. All chips share one
// clock, standing for the package's clock tree.
//
// The chain A -> B -> C follows the module; bringing out every chip's
// control pins and outputs is this design's choice.
module mcm_3des
  import des_pkg::*;
#(
  parameter int unsigned N_CHIPS = 3
) (
  input  logic       clk,
  input  block_t     data_in,
  input  chip_ctl_t  ctl       [N_CHIPS],
  output block_t     data_out  [N_CHIPS],
  output chip_scan_t scan_out  [N_CHIPS],
  output logic [15:0] signature [N_CHIPS]
);

  for (genvar i = 0; i < N_CHIPS; i++) begin : g_chip
    block_t pads_data;
    if (i == 0) begin : g_first
      assign pads_data = data_in;
    end else begin : g_next
      assign pads_data = data_out[i-1];
    end
    des_chip u_chip (
      .clk       (clk),
      .pads_data (pads_data),
      .pads      (ctl[i].pads),
      .opmode    (ctl[i].opmode),
      .select    (ctl[i].select),
      .scanmode  (ctl[i].scanmode),
      .scan_in   (ctl[i].scan_in),
      .data_out  (data_out[i]),
      .scan_out  (scan_out[i]),
      .signature (signature[i])
    );
  end

endmodule
