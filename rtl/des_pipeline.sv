// des_pipeline: the complete DES datapath unrolled into N_STAGES = 16
// pipeline stages, one round per stage, taking a new block every clock.
//
// Each clock the pipeline takes a 64-bit block (din), the 56-bit key of that
// block as its two 28-bit halves after PC1 (key_c = C0, key_d = D0), and an
// opmode bit (0 = encrypt, 1 = decrypt). The initial permutation feeds
// stage 1 so that its cells register E(R0) and L0; the key enters stage 1
// with the first rotation of its direction. Stages 1..16 each perform one
// round. The last stage's f, the final XOR (R16 = L15 ^ f) and the inverse
// initial permutation are combinational from stage 16's registers: a block
// presented on din in clock cycle n (and registered at the end of it) is on
// dout throughout cycle n+16, so a register fed by dout, such as the SAR or
// the first stage of the next chip, captures it 16 clocks after stage 1 did.
// A new result appears every clock. Blocks in flight never
// interact: each has its own key and direction.
//
// Scan: with scanmode = 1 the data/opmode, C and D registers of all stages
// form three chains running from stage 1 to stage 16
// (scan_in_* -> stage 1 -> ... -> stage 16 -> scan_out_*). There is no reset;
// the registers are meant to be loaded by scan or flushed with 16 blocks.
//
// The 16-stage unrolling, the per-stage key and opmode, and the pipelined
// key shifting follow the chip; the tables are the DES standard's; the chain
// order and the point where the last half round is completed are this
// design's choice.
module des_pipeline
  import des_pkg::*;
#(
  parameter int unsigned N_STAGES = N_ROUNDS
) (
  input  logic   clk,
  input  logic   scanmode,
  input  block_t din,
  input  khalf_t key_c,
  input  khalf_t key_d,
  input  logic   opmode,
  output block_t dout,
  input  logic   scan_in_data,
  input  logic   scan_in_key1,
  input  logic   scan_in_key2,
  output logic   scan_out_data,
  output logic   scan_out_key1,
  output logic   scan_out_key2
);

  // Inter-stage signals; index s is the input of stage s+1.
  exp_t   l_e [N_STAGES+1];
  exp_t   f_e [N_STAGES+1];
  half_t  r   [N_STAGES+1];
  khalf_t c   [N_STAGES+1];
  khalf_t d   [N_STAGES+1];
  logic   op  [N_STAGES+1];
  logic   sd  [N_STAGES+1];
  logic   sk1 [N_STAGES+1];
  logic   sk2 [N_STAGES+1];

  half_t  l_o [N_STAGES+1];   // L and f of each stage; only stage 16's are
  half_t  f_o [N_STAGES+1];   // used, to complete the last round
  block_t din_ip;

  // Stage 1 must register E(R0) and L0: R0 enters on the "L" inputs with a
  // zero f, L0 on the "R" inputs.
  assign din_ip = ip(din);
  assign l_o[0] = '0;
  assign f_o[0] = '0;
  assign l_e[0] = e_exp(din_ip[HALF_W-1:0]);
  assign f_e[0] = '0;
  assign r[0]   = din_ip[BLOCK_W-1:HALF_W];
  assign c[0]   = key_c;
  assign d[0]   = key_d;
  assign op[0]  = opmode;
  assign sd[0]  = scan_in_data;
  assign sk1[0] = scan_in_key1;
  assign sk2[0] = scan_in_key2;

  for (genvar s = 1; s <= N_STAGES; s++) begin : g_stage
    des_stage #(.STAGE(s)) u_stage (
      .clk           (clk),
      .scanmode      (scanmode),
      .l_e_in        (l_e[s-1]),
      .f_e_in        (f_e[s-1]),
      .r_in          (r[s-1]),
      .c_in          (c[s-1]),
      .d_in          (d[s-1]),
      .op_in         (op[s-1]),
      .l_e_out       (l_e[s]),
      .f_e_out       (f_e[s]),
      .r_out         (r[s]),
      .l_out         (l_o[s]),
      .f_out         (f_o[s]),
      .c_out         (c[s]),
      .d_out         (d[s]),
      .op_out        (op[s]),
      .scan_in_data  (sd[s-1]),
      .scan_in_key1  (sk1[s-1]),
      .scan_in_key2  (sk2[s-1]),
      .scan_out_data (sd[s]),
      .scan_out_key1 (sk1[s]),
      .scan_out_key2 (sk2[s])
    );
  end

  // Last half round and output permutation: preoutput = R16 || L16.
  assign dout = ip_inv({l_o[N_STAGES] ^ p_perm(f_o[N_STAGES]), r[N_STAGES]});

  assign scan_out_data = sd[N_STAGES];
  assign scan_out_key1 = sk1[N_STAGES];
  assign scan_out_key2 = sk2[N_STAGES];

endmodule
