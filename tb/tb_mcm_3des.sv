// tb_mcm_3des: end-to-end test of the three-chip triple-DES module at its
// default size.
//
// All three chips are initialised by scan (pipelines cleared, key PRNG
// seeds and polynomials, data PRNG of chip A, SARs). Chips B and C take
// their data from the pads, i.e. from the chip before them. Then:
//   - triple-DES encryption (A encrypt, B decrypt, C encrypt) of random
//     blocks from the module input, one per clock;
//   - triple-DES decryption (D, E, D) of random blocks;
//   - chip A on its own data PRNG with opmode alternating every clock and
//     B and C in the same pattern.
// Each block is checked at the output of every chip (16, 32 and 48 clocks
// after it entered) against an iterative DES model fed with the predicted
// key sequences, and each run ends by scanning out the three signatures and
// comparing them with the model. Counts of each mechanism are reported; one
// that never happened counts as a failure.
module tb_mcm_3des;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int NC = 3;
  localparam int LAT = 16;
  localparam int RUN = 3000;
  localparam int CHAIN = 16 * 81;

  logic       clk = 0;
  block_t     data_in = 0;
  chip_ctl_t  ctl [NC];
  block_t     data_out [NC];
  chip_scan_t scan_out [NC];
  logic [15:0] signature [NC];
  int checks = 0, failures = 0;
  int n_3des_enc = 0, n_3des_dec = 0, n_alt = 0, n_prng_src = 0, n_pads_src = 0, n_scan = 0;
  int n_sel [4];

  always #5 clk = ~clk;

  mcm_3des dut (.clk, .data_in, .ctl, .data_out, .scan_out, .signature);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic block_t zero_fill(int t);
    half_t l, r, tmp;
    l = 0; r = 0;
    for (int i = 0; i < t; i++) begin
      tmp = r; r = l ^ f_ref(r, 48'd0); l = tmp;
    end
    return ip_inv({l ^ f_ref(r, 48'd0), r});
  endfunction

  logic [63:0] dp [NC], ds [NC], k1p [NC], k1s [NC], k2p [NC], k2s [NC];
  logic [15:0] sp [NC], ss [NC];

  task automatic scan_load_all();
    for (int c = 0; c < NC; c++) begin
      dp[c]  = {1'b1, 31'($urandom), $urandom}; ds[c] = {$urandom, $urandom} | 64'd1;
      k1p[c] = {36'd0, 1'b1, 27'($urandom)};   k1s[c] = {36'd0, 28'($urandom)} | 64'd1;
      k2p[c] = {36'd0, 1'b1, 27'($urandom)};   k2s[c] = {36'd0, 28'($urandom)} | 64'd1;
      sp[c]  = 16'($urandom) | 16'h8000;       ss[c] = 16'($urandom);
      ctl[c].scanmode = 1;
    end
    for (int b = 0; b < CHAIN; b++) begin
      for (int c = 0; c < NC; c++) begin
        logic [127:0] dv;
        logic [55:0]  k1v, k2v;
        logic [31:0]  sv;
        dv = {dp[c], ds[c]}; k1v = {k1p[c][27:0], k1s[c][27:0]};
        k2v = {k2p[c][27:0], k2s[c][27:0]}; sv = {ss[c], sp[c]};
        ctl[c].scan_in = '0;
        if (b >= CHAIN - 128) ctl[c].scan_in.data_prng = dv[CHAIN - 1 - b];
        if (b >= CHAIN - 56) begin
          ctl[c].scan_in.key_prng1 = k1v[CHAIN - 1 - b];
          ctl[c].scan_in.key_prng2 = k2v[CHAIN - 1 - b];
        end
        if (b >= CHAIN - 32) ctl[c].scan_in.sar = sv[CHAIN - 1 - b];
      end
      @(posedge clk); #1;
    end
    for (int c = 0; c < NC; c++) begin
      ctl[c].scanmode = 0;
      ctl[c].scan_in = '0;
    end
    n_scan++;
  endtask

  // kind: 0 = 3DES encrypt (EDE) from pads, 1 = 3DES decrypt (DED) from
  // pads, 2 = alternating opmode with chip A on its data PRNG
  task automatic run(int kind, int sel);
    block_t ins [NC][RUN + 2*LAT];
    block_t expo [NC][RUN + 2*LAT];
    khalf_t kc [NC][RUN + 2*LAT], kd [NC][RUN + 2*LAT];
    logic   op [NC][RUN + 2*LAT];
    logic [15:0] m [NC], sig [NC];
    int total;
    total = RUN + 2*LAT;
    scan_load_all();
    // key sequences and modes
    for (int c = 0; c < NC; c++)
      for (int t = 0; t < total; t++) begin
        kc[c][t] = k1s[c][27:0]; kd[c][t] = k2s[c][27:0];
        k1s[c] = lfsr_step(k1s[c], k1p[c], 28); k2s[c] = lfsr_step(k2s[c], k2p[c], 28);
        case (kind)
          0: op[c][t] = (c == 1);
          1: op[c][t] = (c != 1);
          default: op[c][t] = 1'(t % 2);
        endcase
      end
    // chip inputs and outputs, chip by chip
    for (int t = 0; t < total; t++) begin
      ins[0][t] = (kind == 2) ? ds[0] : {$urandom, $urandom};
      ds[0] = lfsr_step(ds[0], dp[0], 64);
    end
    for (int c = 0; c < NC; c++)
      for (int t = 0; t < total; t++) begin
        expo[c][t] = (t < LAT) ? zero_fill(t)
                   : des_ref(kc[c][t - LAT], kd[c][t - LAT], ins[c][t - LAT], op[c][t - LAT]);
        if (c + 1 < NC) ins[c + 1][t] = expo[c][t];
      end
    for (int c = 0; c < NC; c++) begin
      m[c] = ss[c];
      ctl[c].pads = (c > 0) || (kind != 2);
      ctl[c].select = 2'(sel);
    end
    for (int t = 0; t < total; t++) begin
      data_in = ins[0][t];
      for (int c = 0; c < NC; c++) ctl[c].opmode = op[c][t];
      #1;
      for (int c = 0; c < NC; c++) begin
        chk(data_out[c] === expo[c][t],
            $sformatf("kind %0d chip %0d cycle %0d: %h expected %h", kind, c, t, data_out[c], expo[c][t]));
        m[c] = sar_step(m[c], sp[c], expo[c][t], sel);
      end
      if (t >= 3*LAT) begin
        if (kind == 0) n_3des_enc++;
        if (kind == 1) n_3des_dec++;
      end
      if (kind == 2 && t > 0) n_alt++;
      if (ctl[0].pads) n_pads_src++; else n_prng_src++;
      @(posedge clk); #1;
    end
    // the 3DES result of the first block, written out the textbook way
    if (kind == 0)
      chk(expo[2][3*LAT] === des_ref(kc[2][2*LAT], kd[2][2*LAT],
                               des_ref(kc[1][LAT], kd[1][LAT],
                                       des_ref(kc[0][0], kd[0][0], ins[0][0], 0), 1), 0),
          "3DES composition");
    // read the signatures
    for (int c = 0; c < NC; c++) ctl[c].scanmode = 1;
    for (int b = 0; b < 16; b++) begin
      for (int c = 0; c < NC; c++) sig[c][15 - b] = scan_out[c].sar;
      @(posedge clk); #1;
    end
    for (int c = 0; c < NC; c++) begin
      ctl[c].scanmode = 0;
      chk(sig[c] === m[c], $sformatf("kind %0d chip %0d signature %h expected %h", kind, c, sig[c], m[c]));
    end
    n_sel[sel]++;
  endtask

  initial begin
    for (int c = 0; c < NC; c++) ctl[c] = '0;
    #1;
    run(0, 0);
    run(1, 1);
    run(2, 2);
    run(0, 3);
    chk(n_3des_enc > 0, "3DES encryption never ran");
    chk(n_3des_dec > 0, "3DES decryption never ran");
    chk(n_alt > 0, "alternating opmode never ran");
    chk(n_prng_src > 0 && n_pads_src > 0, "an input source never used");
    chk(n_scan > 0, "scan load never ran");
    for (int s = 0; s < 4; s++) chk(n_sel[s] > 0, $sformatf("select %0d never used", s));
    $display("3DES enc %0d, 3DES dec %0d, alternating %0d, PRNG source %0d, pads source %0d, scan loads %0d",
             n_3des_enc, n_3des_dec, n_alt, n_prng_src, n_pads_src, n_scan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
