// des_cell: one of the eight cells of a DES pipeline stage. It carries four
// bits of the data path through one stage and owns one S-box.
//
// On each clock the cell stores
//   r_e_q <= l_e ^ f_e   six bits of E(R_new) = E(L_prev) ^ E(P(f_prev)),
//   l_q   <= r           four bits of L_new  = R_prev.
// Keeping the right half in its expanded (48-bit) form means the XOR with
// the previous stage's f happens bit-for-bit before the register, and the
// E expansion is only wiring between stages. After the register the six
// stored bits are XORed with six key bits tapped from the 28-bit key-half
// bus (which six is given by PC2 for this cell number) and looked up in the
// S-box. Outputs: f (4 bits, combinational from the registers), r_out (the
// four unduplicated bits of r_e_q) and l_out (l_q).
//
// The structure (6-bit L and f inputs, 4-bit R, 28-bit key bus, 4/2 split
// of the S-box address) follows the chip's cell. With scanmode = 1 the ten
// register bits form a shift register from scan_in to scan_out instead:
// scan_in enters r_e_q[0], runs up through r_e_q into l_q and leaves from
// l_q[3]. Entering at the E(R) register and leaving from the L register
// follows the chip's cell; the bit order within them is this design's.
module des_cell
  import des_pkg::*;
#(
  parameter int unsigned CELL = 1   // 1..8
) (
  input  logic             clk,
  input  logic             scanmode,
  input  logic             scan_in,
  output logic             scan_out,
  input  logic [5:0]       l_e,
  input  logic [5:0]       f_e,
  input  logic [3:0]       r,
  input  khalf_t           key_bus,
  output logic [3:0]       f,
  output logic [3:0]       r_out,
  output logic [3:0]       l_out
);

  logic [5:0] r_e_q;
  logic [3:0] l_q;
  logic [5:0] kbits;

  always_ff @(posedge clk) begin
    if (scanmode) {l_q, r_e_q} <= {l_q[2:0], r_e_q, scan_in};
    else begin
      r_e_q <= l_e ^ f_e;
      l_q   <= r;
    end
  end

  assign scan_out = l_q[3];

  // Key taps: subkey bit b of this cell is bus bit key_tap(CELL, b).
  always_comb
    for (int b = 1; b <= 6; b++)
      kbits[6-b] = key_bus[KHALF_W - key_tap(CELL, b)];

  sbox #(.BOX(CELL)) u_sbox (.addr(r_e_q ^ kbits), .dout(f));

  assign r_out = r_e_q[4:1];
  assign l_out = l_q;

endmodule
