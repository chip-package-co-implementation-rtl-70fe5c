// tb_des_cell: all eight cell positions with random inputs and key bus.
// After each clock the cell must show, for its position k:
//   f     = S_k(E(R) bits ^ subkey bits of cell k), subkey from PC2,
//   r_out = the middle four of the six registered bits,
//   l_out = the registered R input.
// Also shifts a pattern through each cell's 10-bit scan chain.
module tb_des_cell;
  import des_pkg::*;

  logic clk = 0, scanmode = 0;
  logic [5:0]  l_e [8], f_e [8];
  logic [3:0]  r [8], f [8], r_out [8], l_out [8];
  logic        si [8], so [8];
  khalf_t      key_bus;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar k = 0; k < 8; k++) begin : g_cell
    des_cell #(.CELL(k + 1)) dut (
      .clk, .scanmode, .scan_in(si[k]), .scan_out(so[k]),
      .l_e(l_e[k]), .f_e(f_e[k]), .r(r[k]), .key_bus,
      .f(f[k]), .r_out(r_out[k]), .l_out(l_out[k]));
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] x [8], kb;
    logic [3:0] rr [8];
    logic [47:0] sub;
    logic [9:0] pat [8];
    for (int k = 0; k < 8; k++) si[k] = 0;
    #1;
    for (int t = 0; t < 500; t++) begin
      key_bus = 28'($urandom);
      for (int k = 0; k < 8; k++) begin
        l_e[k] = 6'($urandom); f_e[k] = 6'($urandom); r[k] = 4'($urandom);
        x[k] = l_e[k] ^ f_e[k]; rr[k] = r[k];
      end
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) begin
        sub = (k < 4) ? pc2(key_bus, 28'd0) : pc2(28'd0, key_bus);
        kb = sub[47 - 6*k -: 6] ^ x[k];
        checks += 3;
        if (f[k] !== SBOX[k][{kb[5], kb[0]}][kb[4:1]]) begin
          failures++; $display("FAIL cell %0d f=%h", k + 1, f[k]);
        end
        if (r_out[k] !== x[k][4:1]) begin failures++; $display("FAIL cell %0d r_out", k + 1); end
        if (l_out[k] !== rr[k]) begin failures++; $display("FAIL cell %0d l_out", k + 1); end
      end
    end
    // scan: 10 bits in, then 10 more to push them out
    scanmode = 1;
    for (int k = 0; k < 8; k++) pat[k] = 10'($urandom);
    for (int i = 0; i < 20; i++) begin
      for (int k = 0; k < 8; k++) si[k] = (i < 10) ? pat[k][9 - i] : 1'b0;
      #1;
      if (i >= 10)
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (so[k] !== pat[k][19 - i]) begin failures++; $display("FAIL scan cell %0d bit %0d", k + 1, i); end
        end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
