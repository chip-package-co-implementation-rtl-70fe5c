// tb_des_stage: stages 1, 2, 9 and 16 (the positions with different key
// rotations) with random inputs and both opmodes. After each clock a stage
// must hold R = L_prev ^ f_prev and L = R_prev, show f such that P(f) is
// the round function of R under the subkey PC2(rotated C, D), and pass on
// the key halves rotated the right way by the right amount for its round.
// Also shifts patterns through the three scan chains.
module tb_des_stage;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int N = 4;
  localparam int unsigned ST [N] = '{1, 2, 9, 16};

  logic clk = 0, scanmode = 0;
  exp_t   l_e_in, f_e_in;
  half_t  r_in;
  khalf_t c_in, d_in;
  logic   op_in;
  exp_t   l_e_out [N], f_e_out [N];
  half_t  r_out [N], l_out [N], f_out [N];
  khalf_t c_out [N], d_out [N];
  logic   op_out [N];
  logic   si_d, si_k1, si_k2;
  logic   so_d [N], so_k1 [N], so_k2 [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_st
    des_stage #(.STAGE(ST[i])) dut (
      .clk, .scanmode, .l_e_in, .f_e_in, .r_in, .c_in, .d_in, .op_in,
      .l_e_out(l_e_out[i]), .f_e_out(f_e_out[i]), .r_out(r_out[i]), .l_out(l_out[i]),
      .f_out(f_out[i]), .c_out(c_out[i]), .d_out(d_out[i]), .op_out(op_out[i]),
      .scan_in_data(si_d), .scan_in_key1(si_k1), .scan_in_key2(si_k2),
      .scan_out_data(so_d[i]), .scan_out_key1(so_k1[i]), .scan_out_key2(so_k2[i]));
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what, int i);
    checks++;
    if (!ok) begin failures++; $display("FAIL stage %0d: %s", ST[i], what); end
  endtask

  initial begin
    half_t lp, fp, rp, rn;
    khalf_t c_exp, d_exp;
    int n;
    logic [80:0] pd;
    logic [27:0] p1, p2;
    si_d = 0; si_k1 = 0; si_k2 = 0;
    #1;
    for (int t = 0; t < 400; t++) begin
      lp = $urandom; fp = $urandom; rp = $urandom;
      c_in = 28'($urandom); d_in = 28'($urandom); op_in = 1'($urandom);
      l_e_in = e_exp(lp); f_e_in = e_exp(fp); r_in = rp;
      @(posedge clk); #1;
      rn = lp ^ fp;
      for (int i = 0; i < N; i++) begin
        c_exp = c_in; d_exp = d_in;
        if (op_in) n = (ST[i] == 1) ? 0 : int'(SHIFTS[17 - ST[i]]);
        else       n = int'(SHIFTS[ST[i] - 1]);
        for (int s = 0; s < n; s++)
          if (op_in) begin
            c_exp = {c_exp[0], c_exp[27:1]}; d_exp = {d_exp[0], d_exp[27:1]};
          end else begin
            c_exp = {c_exp[26:0], c_exp[27]}; d_exp = {d_exp[26:0], d_exp[27]};
          end
        chk(c_out[i] === c_exp && d_out[i] === d_exp, "key rotation", i);
        chk(op_out[i] === op_in, "opmode", i);
        chk(r_out[i] === rn, "R = L ^ f", i);
        chk(l_out[i] === rp, "L = R_prev", i);
        chk(p_perm(f_out[i]) === f_ref(rn, pc2(c_exp, d_exp)), "round function", i);
        chk(f_e_out[i] === e_exp(p_perm(f_out[i])) && l_e_out[i] === e_exp(rp), "P,E wiring", i);
      end
    end
    // scan chains: data chain is 8*10 + 1 = 81 bits, key chains 28 bits
    pd = {$urandom, $urandom, 17'($urandom)};
    p1 = 28'($urandom); p2 = 28'($urandom);
    scanmode = 1;
    for (int b = 0; b < 162; b++) begin
      si_d  = (b < 81) ? pd[80 - b] : 1'b0;
      si_k1 = (b < 28) ? p1[27 - b] : 1'b0;
      si_k2 = (b < 28) ? p2[27 - b] : 1'b0;
      #1;
      for (int i = 0; i < N; i++) begin
        if (b >= 81) chk(so_d[i] === pd[161 - b], "data scan chain", i);
        if (b >= 28 && b < 56) chk(so_k1[i] === p1[55 - b] && so_k2[i] === p2[55 - b], "key scan chains", i);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
