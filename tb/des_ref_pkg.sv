// des_ref_pkg: reference models used by the testbenches.
//
// des_ref() is a plain iterative DES (subkeys first, then 16 Feistel
// rounds), written from the DES standard and independent of the pipelined
// structure of the RTL. It shares only the standard permutation tables of
// des_pkg; known-answer vectors in the testbenches check those tables.
// Also here: PC1 (to turn a 64-bit key into C0/D0), the software models of
// the Galois LFSR used by the PRNGs and of the signature register.
package des_ref_pkg;
  import des_pkg::*;

  typedef int unsigned pc1_t [56];
  localparam pc1_t PC1_T = '{
    57,49,41,33,25,17, 9,  1,58,50,42,34,26,18,
    10, 2,59,51,43,35,27, 19,11, 3,60,52,44,36,
    63,55,47,39,31,23,15,  7,62,54,46,38,30,22,
    14, 6,61,53,45,37,29, 21,13, 5,28,20,12, 4};

  function automatic logic [55:0] pc1(logic [63:0] k);
    for (int j = 1; j <= 56; j++) pc1[56-j] = k[64-PC1_T[j-1]];
  endfunction

  function automatic logic [31:0] f_ref(logic [31:0] r, logic [47:0] k);
    logic [47:0] x;
    logic [31:0] s;
    x = e_exp(r) ^ k;
    for (int b = 0; b < 8; b++) begin
      logic [5:0] six;
      six = x[47-6*b -: 6];
      s[31-4*b -: 4] = SBOX[b][{six[5], six[0]}][six[4:1]];
    end
    return p_perm(s);
  endfunction

  // DES with key halves C0/D0 (after PC1).
  function automatic logic [63:0] des_ref(logic [27:0] c0, logic [27:0] d0,
                                          logic [63:0] blk, logic decrypt);
    logic [47:0] k [16];
    logic [27:0] c, d;
    logic [63:0] x;
    logic [31:0] l, r, t;
    c = c0; d = d0;
    for (int i = 0; i < 16; i++) begin
      for (int n = 0; n < SHIFTS[i]; n++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
      k[i] = pc2(c, d);
    end
    x = ip(blk);
    l = x[63:32]; r = x[31:0];
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ f_ref(r, decrypt ? k[15-i] : k[i]);
      l = t;
    end
    return ip_inv({r, l});
  endfunction

  function automatic logic [63:0] des_key64(logic [63:0] key, logic [63:0] blk, logic decrypt);
    logic [55:0] cd;
    cd = pc1(key);
    return des_ref(cd[55:28], cd[27:0], blk, decrypt);
  endfunction

  // One Galois LFSR step on a value of width w held in the low bits.
  function automatic logic [63:0] lfsr_step(logic [63:0] s, logic [63:0] poly, int w);
    logic [63:0] mask, n;
    mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    n = (s & mask) >> 1;
    if (s[0]) n = n ^ (poly & mask);
    return n;
  endfunction

  function automatic logic [15:0] sar_step(logic [15:0] s, logic [15:0] poly,
                                           logic [63:0] d, int sel);
    logic [15:0] g, n;
    case (sel)
      0: g = d[63:48];
      1: g = d[47:32];
      2: g = d[31:16];
      default: g = d[15:0];
    endcase
    n = {1'b0, s[15:1]};
    if (s[0]) n = n ^ poly;
    return n ^ g;
  endfunction

endpackage
