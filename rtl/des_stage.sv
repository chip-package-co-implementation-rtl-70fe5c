// des_stage: one stage of the unrolled DES pipeline, i.e. one round.
//
// The stage holds, in registers loaded every clock:
//   - the data of its round inside eight des_cell instances (E(R) as 48
//     bits, L as 32 bits),
//   - the two 28-bit key halves C and D of the block it holds, and
//   - that block's opmode bit (1 = decrypt).
// The key halves arrive unrotated from the previous stage together with the
// previous stage's opmode, which picks the rotation on the way in: left by
// the round's encryption shift, or right by the shift of the encryption
// round being undone. So every block carries its own key and direction down
// the pipe, and neighbouring stages may encrypt and decrypt different blocks
// in the same cycle. Cells 1-4 read the C register, cells 5-8 the D register.
// Below the cells, the stage's outputs pass through the P and E wiring that
// feeds the next stage: f_e_out = E(P(f)), l_e_out = E(L).
//
// Inputs and outputs use DES bit order (bit 1 = MSB). All outputs except the
// registered ones are combinational from this stage's registers; the stage
// adds one clock of latency. With scanmode = 1 three chains shift instead:
// data (cells 1..8, then the opmode bit), key 1 (C) and key 2 (D).
//
// The stage structure, the split of the key bus over the cells and the
// opmode-steered left/right key shift follow the chip. The rotation amounts
// and tables are the DES standard's; the chain orders are this design's.
module des_stage
  import des_pkg::*;
#(
  parameter int unsigned STAGE = 1   // 1..16
) (
  input  logic   clk,
  input  logic   scanmode,
  // previous stage (or pipeline input)
  input  exp_t   l_e_in,
  input  exp_t   f_e_in,
  input  half_t  r_in,
  input  khalf_t c_in,
  input  khalf_t d_in,
  input  logic   op_in,
  // to the next stage
  output exp_t   l_e_out,
  output exp_t   f_e_out,
  output half_t  r_out,
  output half_t  l_out,
  output half_t  f_out,
  output khalf_t c_out,
  output khalf_t d_out,
  output logic   op_out,
  // scan chains
  input  logic   scan_in_data,
  input  logic   scan_in_key1,
  input  logic   scan_in_key2,
  output logic   scan_out_data,
  output logic   scan_out_key1,
  output logic   scan_out_key2
);

  localparam int unsigned ENC_SH = enc_shift(STAGE);
  localparam int unsigned DEC_SH = dec_shift(STAGE);

  khalf_t c_q, d_q, c_rot, d_rot;
  logic   op_q;
  logic [N_CELLS:0] chain;

  // Key shifter between stages: the previous opmode steers each key bit to
  // its left or its right neighbour.
  always_comb begin
    if (op_in == OP_DECRYPT) begin
      c_rot = rotr(c_in, DEC_SH);
      d_rot = rotr(d_in, DEC_SH);
    end else begin
      c_rot = rotl(c_in, ENC_SH);
      d_rot = rotl(d_in, ENC_SH);
    end
  end

  always_ff @(posedge clk) begin
    if (scanmode) begin
      c_q  <= {c_q[KHALF_W-2:0], scan_in_key1};
      d_q  <= {d_q[KHALF_W-2:0], scan_in_key2};
      op_q <= chain[N_CELLS];
    end else begin
      c_q  <= c_rot;
      d_q  <= d_rot;
      op_q <= op_in;
    end
  end

  assign chain[0] = scan_in_data;

  for (genvar k = 1; k <= N_CELLS; k++) begin : g_cell
    des_cell #(.CELL(k)) u_cell (
      .clk      (clk),
      .scanmode (scanmode),
      .scan_in  (chain[k-1]),
      .scan_out (chain[k]),
      .l_e      (l_e_in[EXP_W-6*(k-1)-1 -: 6]),
      .f_e      (f_e_in[EXP_W-6*(k-1)-1 -: 6]),
      .r        (r_in[HALF_W-4*(k-1)-1 -: 4]),
      .key_bus  ((k <= 4) ? c_q : d_q),
      .f        (f_out[HALF_W-4*(k-1)-1 -: 4]),
      .r_out    (r_out[HALF_W-4*(k-1)-1 -: 4]),
      .l_out    (l_out[HALF_W-4*(k-1)-1 -: 4])
    );
  end

  // P and E inter-stage wiring.
  assign f_e_out = e_exp(p_perm(f_out));
  assign l_e_out = e_exp(l_out);

  assign c_out  = c_q;
  assign d_out  = d_q;
  assign op_out = op_q;

  assign scan_out_data = op_q;
  assign scan_out_key1 = c_q[KHALF_W-1];
  assign scan_out_key2 = d_q[KHALF_W-1];

endmodule
