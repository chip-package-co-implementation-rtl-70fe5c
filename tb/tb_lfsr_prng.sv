// tb_lfsr_prng: loads seed and polynomial by scan into a 64-bit and a 28-bit
// PRNG, runs them and compares every vector with a software Galois LFSR,
// then scans the registers out and checks what comes out against what
// should be there. Also checks that a zero polynomial gives a plain shift.
module tb_lfsr_prng;
  import des_ref_pkg::*;

  logic clk = 0, scanmode = 0;
  logic si64, so64, si28, so28;
  logic [63:0] q64;
  logic [27:0] q28;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_prng #(.WIDTH(64)) dut64 (.clk, .scanmode, .scan_in(si64), .scan_out(so64), .q(q64));
  lfsr_prng #(.WIDTH(28)) dut28 (.clk, .scanmode, .scan_in(si28), .scan_out(so28), .q(q28));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shift {poly, seed} in, first bit ends in poly's MSB; collects what
  // comes out.
  task automatic load(logic [63:0] p64, logic [63:0] s64, logic [27:0] p28, logic [27:0] s28,
                      output logic [127:0] out64, output logic [55:0] out28);
    logic [127:0] v64;
    logic [55:0]  v28;
    v64 = {p64, s64};
    v28 = {p28, s28};
    scanmode = 1;
    for (int i = 0; i < 128; i++) begin
      si64 = v64[127 - i];
      si28 = (i >= 72) ? v28[127 - i] : 1'b0;
      out64[127 - i] = so64;
      if (i < 56) out28[55 - i] = so28;
      @(posedge clk); #1;
    end
    scanmode = 0;
  endtask

  initial begin
    logic [63:0] p64, s64, m64;
    logic [27:0] p28, s28, m28;
    logic [127:0] o64;
    logic [55:0]  o28;
    si64 = 0; si28 = 0;
    #1;
    for (int run = 0; run < 3; run++) begin
      p64 = (run == 2) ? 64'd0 : {1'b1, 31'($urandom), $urandom};
      s64 = {$urandom, $urandom} | 64'd1;
      p28 = (run == 2) ? 28'd0 : {1'b1, 27'($urandom)};
      s28 = 28'($urandom) | 28'd1;
      load(p64, s64, p28, s28, o64, o28);
      m64 = s64; m28 = s28;
      for (int t = 0; t < 300; t++) begin
        checks += 2;
        if (q64 !== m64) begin failures++; $display("FAIL run %0d t %0d q64=%h exp %h", run, t, q64, m64); end
        if (q28 !== m28) begin failures++; $display("FAIL run %0d t %0d q28=%h exp %h", run, t, q28, m28); end
        m64 = lfsr_step(m64, p64, 64);
        m28 = 28'(lfsr_step({36'd0, m28}, {36'd0, p28}, 28));
        @(posedge clk); #1;
      end
      // scan out: the chain must hold the polynomial and the current state
      load(64'd0, 64'd0, 28'd0, 28'd0, o64, o28);
      checks += 2;
      if (o64 !== {p64, m64}) begin failures++; $display("FAIL scan out 64: %h", o64); end
      if (o28 !== {p28, m28}) begin failures++; $display("FAIL scan out 28: %h", o28); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
