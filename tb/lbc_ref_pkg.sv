// lbc_ref_pkg -- word-level reference model of LBC-IoT for the testbenches.
//
// Computes the cipher one whole 16-bit round and one whole key-schedule
// step at a time, straight from the equations, with its own copies of the
// S-box table and the permutation tables. It shares no code with the RTL,
// so the serial hardware is checked against an independent description.
//   round:    L' = P2(R),  R' = P1(L ^ K ^ S(R <<< 7))
//   subkeys:  K1..K5 = key[15:0], key[31:16], ..., key[79:64]
//             KM = key[79:40], KL = key[39:0]; for K6..K32:
//             a = KL <<< 3; t = S(a[15:0] ^ KM[15:0]); K = t ^ P1(KM[15:0]);
//             KL = {a[39:16], t}; KM = {K, KM[39:16]}
//   permutation tables use FIPS numbering: output bit x (1 = MSB) is input
//   bit P(x).
package lbc_ref_pkg;

  typedef logic [15:0] sk_t [32];

  function automatic logic [3:0] ref_s(input logic [3:0] x);
    logic [3:0] t [16] = '{4'h0, 4'h8, 4'h6, 4'hD, 4'h5, 4'hF, 4'h7, 4'hC,
                           4'h4, 4'hE, 4'h2, 4'h3, 4'h9, 4'h1, 4'hB, 4'hA};
    return t[x];
  endfunction

  function automatic logic [15:0] ref_s16(input logic [15:0] x);
    return {ref_s(x[15:12]), ref_s(x[11:8]), ref_s(x[7:4]), ref_s(x[3:0])};
  endfunction

  function automatic logic [15:0] ref_perm(input logic [15:0] d, input bit second);
    int t1 [16] = '{13, 10, 7, 12, 9, 14, 3, 2, 5, 16, 15, 4, 1, 6, 11, 8};
    int t2 [16] = '{5, 8, 16, 12, 3, 11, 2, 13, 4, 1, 14, 6, 9, 15, 7, 10};
    logic [15:0] o;
    for (int x = 1; x <= 16; x++) o[16-x] = d[16 - (second ? t2[x-1] : t1[x-1])];
    return o;
  endfunction

  // inverse found by search, not by reading the table backwards
  function automatic logic [15:0] ref_perm_inv(input logic [15:0] d, input bit second);
    logic [15:0] o;
    for (int b = 0; b < 16; b++) begin
      logic [15:0] e;
      e = ref_perm(16'(1) << b, second);
      o[b] = |(e & d);
    end
    return o;
  endfunction

  function automatic logic [15:0] ref_rotl7(input logic [15:0] d);
    return (d << 7) | (d >> 9);
  endfunction

  function automatic sk_t ref_subkeys(input logic [79:0] key);
    sk_t k;
    logic [39:0] km, kl, a;
    logic [15:0] t, kk;
    for (int i = 0; i < 5; i++) k[i] = key[16*i +: 16];
    km = key[79:40];
    kl = key[39:0];
    for (int j = 5; j < 32; j++) begin
      a  = (kl << 3) | (kl >> 37);
      t  = ref_s16(a[15:0] ^ km[15:0]);
      kk = t ^ ref_perm(km[15:0], 1'b0);
      kl = {a[39:16], t};
      km = {kk, km[39:16]};
      k[j] = kk;
    end
    return k;
  endfunction

  function automatic logic [31:0] ref_round(input logic [31:0] s, input logic [15:0] k);
    logic [15:0] l, r;
    {l, r} = s;
    return {ref_perm(r, 1'b1), ref_perm(l ^ k ^ ref_s16(ref_rotl7(r)), 1'b0)};
  endfunction

  function automatic logic [31:0] ref_encrypt(input logic [31:0] p, input logic [79:0] key);
    sk_t k = ref_subkeys(key);
    logic [31:0] s = p;
    for (int i = 0; i < 32; i++) s = ref_round(s, k[i]);
    return s;
  endfunction

  function automatic logic [31:0] ref_decrypt(input logic [31:0] c, input logic [79:0] key);
    sk_t k = ref_subkeys(key);
    logic [15:0] l, r, lp, rp;
    {l, r} = c;
    for (int i = 31; i >= 0; i--) begin
      rp = ref_perm_inv(l, 1'b1);
      lp = ref_perm_inv(r, 1'b0) ^ k[i] ^ ref_s16(ref_rotl7(rp));
      l = lp;
      r = rp;
    end
    return {l, r};
  endfunction

endpackage
