// tb_des_pipeline: streams one block per clock through the 16-stage
// pipeline, each with its own key and direction, and checks every output
// against an iterative DES model. A block presented in clock cycle n must be
// on dout in cycle n+16 (one new result per clock).
//
// Phases: standard known-answer vectors (encrypt, then decrypt of their
// ciphertexts), random blocks all encrypting, all decrypting, alternating
// encrypt/decrypt every clock, and random opmode. Every random ciphertext
// is also fed back for decryption to check the round trip. Finally the
// three scan chains (1296, 448 and 448 bits) are shifted end to end.
// During the alternating phase the stages' opmode registers must show eight
// encryptions and eight decryptions in flight at once.
module tb_des_pipeline;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int LAT = 16;
  localparam int NBLK = 1200;

  logic   clk = 0, scanmode = 0;
  block_t din, dout;
  khalf_t key_c, key_d;
  logic   opmode;
  logic   si_d = 0, si_k1 = 0, si_k2 = 0, so_d, so_k1, so_k2;
  int checks = 0, failures = 0;

  block_t exp_q [NBLK + LAT];
  block_t in_q  [NBLK + LAT];
  khalf_t kc_q  [NBLK + LAT], kd_q [NBLK + LAT];
  logic   op_q  [NBLK + LAT];

  always #5 clk = ~clk;

  des_pipeline dut (
    .clk, .scanmode, .din, .key_c, .key_d, .opmode, .dout,
    .scan_in_data(si_d), .scan_in_key1(si_k1), .scan_in_key2(si_k2),
    .scan_out_data(so_d), .scan_out_key1(so_k1), .scan_out_key2(so_k2));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // standard known answers: key, plaintext, ciphertext
  typedef struct { logic [63:0] k, p, c; } kat_t;
  localparam int NKAT = 5;
  kat_t kat [NKAT] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0E329232EA6D0D73, 64'h8787878787878787, 64'h0000000000000000},
    '{64'h0123456789ABCDEF, 64'h4E6F772069732074, 64'h3FA40E8A984D4815},
    '{64'h0101010101010101, 64'h8000000000000000, 64'h95F8A5E5DD31D900},
    '{64'h0101010101010101, 64'h0000000000000000, 64'h8CA64DE9C1B123A7}};

  int n_enc = 0, n_dec = 0, n_switch = 0, n_mixed = 0;

  // opmode bits held by the 16 stages
  logic stage_op [16];
  for (genvar k = 0; k < 16; k++) begin : g_op
    assign stage_op[k] = dut.g_stage[k + 1].u_stage.op_out;
  end

  function automatic int count_dec();
    int c = 0;
    for (int k = 0; k < 16; k++) c += int'(stage_op[k]);
    return c;
  endfunction

  initial begin
    logic [55:0] cd;
    logic [1023:0] pat;
    int n;
    din = 0; key_c = 0; key_d = 0; opmode = 0;
    #1;
    n = 0;
    // build the stimulus
    for (int i = 0; i < NKAT; i++) begin
      cd = pc1(kat[i].k);
      in_q[n] = kat[i].p; kc_q[n] = cd[55:28]; kd_q[n] = cd[27:0]; op_q[n] = 0; exp_q[n] = kat[i].c; n++;
      in_q[n] = kat[i].c; kc_q[n] = cd[55:28]; kd_q[n] = cd[27:0]; op_q[n] = 1; exp_q[n] = kat[i].p; n++;
    end
    while (n < NBLK) begin
      in_q[n] = {$urandom, $urandom};
      kc_q[n] = 28'($urandom); kd_q[n] = 28'($urandom);
      if (n < 300)      op_q[n] = 0;
      else if (n < 500) op_q[n] = 1;
      else if (n < 800) op_q[n] = 1'(n % 2);
      else              op_q[n] = 1'($urandom);
      exp_q[n] = des_ref(kc_q[n], kd_q[n], in_q[n], op_q[n]);
      n++;
      if (n < NBLK && n % 3 == 0) begin
        // round trip of the previous block
        in_q[n] = exp_q[n-1]; kc_q[n] = kc_q[n-1]; kd_q[n] = kd_q[n-1];
        op_q[n] = ~op_q[n-1]; exp_q[n] = in_q[n-1]; n++;
      end
    end
    for (int i = 0; i < NKAT; i++) begin
      checks++;
      if (des_key64(kat[i].k, kat[i].p, 0) !== kat[i].c) begin
        failures++; $display("FAIL reference model on KAT %0d", i);
      end
    end
    // stream it
    for (int t = 0; t < NBLK + LAT; t++) begin
      if (t < NBLK) begin
        din = in_q[t]; key_c = kc_q[t]; key_d = kd_q[t]; opmode = op_q[t];
        if (opmode) n_dec++; else n_enc++;
        if (t > 0 && op_q[t] != op_q[t-1]) n_switch++;
      end
      @(posedge clk); #1;
      if (t >= LAT - 1 && t - (LAT - 1) < NBLK) begin
        checks++;
        if (dout !== exp_q[t - (LAT - 1)]) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d: dout=%h expected %h", t - (LAT - 1), dout, exp_q[t - (LAT - 1)]);
        end
      end
      // alternating phase: eight encryptions and eight decryptions in flight
      if (t >= 500 + LAT && t < 780) begin
        checks++;
        n_mixed++;
        if (count_dec() != 8) begin failures++; $display("FAIL %0d decryptions in flight at %0d", count_dec(), t); end
      end
      if (t == LAT - 2) begin
        // one cycle early the block must not be there yet
        checks++;
        if (dout === exp_q[0]) begin failures++; $display("FAIL latency shorter than %0d", LAT); end
      end
    end
    // scan chains end to end
    pat = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
           $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    scanmode = 1;
    for (int b = 0; b < 1296 + 64; b++) begin
      si_d  = pat[b % 1024];
      si_k1 = pat[(b + 7) % 1024];
      si_k2 = pat[(b + 13) % 1024];
      #1;
      if (b >= 1296) begin
        checks++;
        if (so_d !== pat[(b - 1296) % 1024]) begin failures++; $display("FAIL data scan chain bit %0d", b); end
      end
      if (b >= 448 && b < 448 + 64) begin
        checks++;
        if (so_k1 !== pat[(b - 448 + 7) % 1024] || so_k2 !== pat[(b - 448 + 13) % 1024]) begin
          failures++; $display("FAIL key scan chain bit %0d", b);
        end
      end
      @(posedge clk); #1;
    end
    scanmode = 0;
    checks++;
    if (n_enc == 0 || n_dec == 0 || n_switch < 100 || n_mixed == 0) begin
      failures++; $display("FAIL mode coverage enc=%0d dec=%0d switches=%0d", n_enc, n_dec, n_switch);
    end
    $display("encrypt %0d, decrypt %0d, opmode switches %0d", n_enc, n_dec, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
