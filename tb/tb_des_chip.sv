// tb_des_chip: runs the chip's self test the way it is used on the bench.
// For each of encrypt-only, decrypt-only and alternating opmode, and for
// each of the four 16-bit output groups (select = 0..3):
//   1. scan in: all pipeline registers cleared, seeds and polynomials of
//      the three PRNGs and of the SAR;
//   2. run RUN clocks on PRNG data (pads = 0);
//   3. scan the SAR out and compare with the signature predicted by a
//      software model (PRNG sequences -> iterative DES -> MISR).
// Every data_out word is also compared directly, which checks the 16-cycle
// latency. A last run takes data from the pads instead of the PRNG.
module tb_des_chip;
  import des_pkg::*;
  import des_ref_pkg::*;

  localparam int LAT = 16;
  localparam int RUN = 25000;  // vectors per test, as in the bench test
  localparam int CHAIN = 16 * 81;   // longest chain: pipeline data/opmode

  logic       clk = 0;
  block_t     pads_data = 0, data_out;
  logic       pads = 0, opmode = 0, scanmode = 0;
  logic [1:0] select = 0;
  chip_scan_t scan_in, scan_out;
  logic [15:0] signature;
  int checks = 0, failures = 0;
  int n_runs [4];   // encrypt-only, decrypt-only, alternating, pads

  always #5 clk = ~clk;

  des_chip dut (.clk, .pads_data, .pads, .opmode, .select, .scanmode, .scan_in,
                .data_out, .scan_out, .signature);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Loads every chain; the last bit of each vector goes in last. The
  // pipeline chains get zeros.
  task automatic scan_load(logic [127:0] dprng, logic [55:0] kprng1, logic [55:0] kprng2,
                           logic [31:0] sarv);
    scanmode = 1;
    for (int b = 0; b < CHAIN; b++) begin
      scan_in = '0;
      if (b >= CHAIN - 128) scan_in.data_prng = dprng[CHAIN - 1 - b];
      if (b >= CHAIN - 56) begin
        scan_in.key_prng1 = kprng1[CHAIN - 1 - b];
        scan_in.key_prng2 = kprng2[CHAIN - 1 - b];
      end
      if (b >= CHAIN - 32) scan_in.sar = sarv[CHAIN - 1 - b];
      @(posedge clk); #1;
    end
    scanmode = 0;
    scan_in = '0;
  endtask

  task automatic scan_sar(output logic [15:0] sig);
    scanmode = 1;
    for (int b = 0; b < 16; b++) begin
      sig[15 - b] = scan_out.sar;
      @(posedge clk); #1;
    end
    scanmode = 0;
  endtask

  // Output while the cleared pipeline drains: before clock t (t < 16) stage
  // 16 holds what was an all-zero stage t clocks earlier, after t rounds
  // with an all-zero key.
  function automatic block_t zero_fill(int t);
    half_t l, r, tmp;
    l = 0; r = 0;
    for (int i = 0; i < t; i++) begin
      tmp = r; r = l ^ f_ref(r, 48'd0); l = tmp;
    end
    return ip_inv({l ^ f_ref(r, 48'd0), r});
  endfunction

  // mode: 0 encrypt only, 1 decrypt only, 2 alternating
  task automatic run_test(int mode, int sel, logic use_pads);
    logic [63:0] dp, ds, k1p, k1s, k2p, k2s;
    logic [15:0] sp, ss, m, sig;
    block_t ins [RUN];
    khalf_t kc [RUN], kd [RUN];
    logic   op [RUN];
    block_t expv;
    dp = {1'b1, 31'($urandom), $urandom}; ds = {$urandom, $urandom} | 64'd1;
    k1p = {36'd0, 1'b1, 27'($urandom)};   k1s = {36'd0, 28'($urandom)} | 64'd1;
    k2p = {36'd0, 1'b1, 27'($urandom)};   k2s = {36'd0, 28'($urandom)} | 64'd1;
    sp = 16'($urandom) | 16'h8000;        ss = 16'($urandom);
    scan_load({dp, ds}, {k1p[27:0], k1s[27:0]}, {k2p[27:0], k2s[27:0]}, {ss, sp});
    // predicted sequences
    for (int t = 0; t < RUN; t++) begin
      ins[t] = use_pads ? {$urandom, $urandom} : ds;
      kc[t] = k1s[27:0]; kd[t] = k2s[27:0];
      op[t] = (mode == 2) ? 1'(t % 2) : (mode == 1);
      ds = lfsr_step(ds, dp, 64); k1s = lfsr_step(k1s, k1p, 28); k2s = lfsr_step(k2s, k2p, 28);
    end
    m = ss;
    pads = use_pads; select = 2'(sel);
    for (int t = 0; t < RUN; t++) begin
      pads_data = ins[t]; opmode = op[t];
      #1;
      expv = (t < LAT) ? zero_fill(t) : des_ref(kc[t - LAT], kd[t - LAT], ins[t - LAT], op[t - LAT]);
      chk(data_out === expv, $sformatf("data_out cycle %0d mode %0d: %h expected %h", t, mode, data_out, expv));
      m = sar_step(m, sp, expv, sel);
      @(posedge clk); #1;
    end
    scan_sar(sig);
    chk(sig === m, $sformatf("signature mode %0d select %0d: %h expected %h", mode, sel, sig, m));
    n_runs[use_pads ? 3 : mode]++;
  endtask

  initial begin
    scan_in = '0;
    #1;
    for (int mode = 0; mode < 3; mode++)
      for (int sel = 0; sel < 4; sel++)
        run_test(mode, sel, 1'b0);
    run_test(2, 1, 1'b1);
    for (int i = 0; i < 4; i++) chk(n_runs[i] > 0, $sformatf("run kind %0d never happened", i));
    $display("runs: encrypt %0d, decrypt %0d, alternating %0d, pads %0d",
             n_runs[0], n_runs[1], n_runs[2], n_runs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
