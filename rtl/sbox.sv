// sbox: one DES S-box built the way the chip builds it, as a decoded ROM
// followed by a multiplexer.
//
// The 6-bit input is split in two. Its middle four bits (DES bits 2..5, the
// column) are decoded to one of 16 ROM words; each word holds the four 4-bit
// outputs the S-box can give for that column, one per row. The outer two
// bits (DES bits 1 and 6, the row) then pick one of those four nibbles.
// Purely combinational. The decode/ROM/mux split follows the chip; the table
// contents and which input bits are row and column are the DES standard's.
//
//   addr  6-bit input, DES bit 1 = addr[5]
//   dout  4-bit output, DES bit 1 = dout[3]
module sbox
  import des_pkg::*;
#(
  parameter int unsigned BOX = 1   // 1..8 selects S1..S8
) (
  input  logic [5:0] addr,
  output logic [3:0] dout
);

  // ROM word c = {row3, row2, row1, row0} for column c.
  logic [15:0] rom [16];

  for (genvar c = 0; c < 16; c++) begin : g_word
    for (genvar rw = 0; rw < 4; rw++) begin : g_row
      assign rom[c][4*rw +: 4] = SBOX[BOX-1][rw][c];
    end
  end

  logic [3:0]  col;
  logic [1:0]  row;
  logic [15:0] word_sel;

  assign col = addr[4:1];
  assign row = {addr[5], addr[0]};

  always_comb begin
    word_sel = '0;
    for (int c = 0; c < 16; c++)
      if (col == 4'(c)) word_sel = rom[c];   // one-hot decode into the ROM
  end

  assign dout = word_sel[4*row +: 4];

endmodule
