// Unprotected reference model of ASCON-128 (64-bit rate, 12/6 rounds) for the
// testbenches: the permutation and encryption of whole 64-bit words without
// associated data. Testbenches use it to make ciphertexts and tags and to
// check the protected hardware against it.
package ascon_ref_pkg;
  typedef logic [4:0][63:0] state_t;

  function automatic logic [63:0] rr(logic [63:0] x, int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic state_t perm(state_t s, int rounds);
    for (int i = 12 - rounds; i < 12; i++) begin
      logic [63:0] x0, x1, x2, x3, x4, t0, t1, t2, t3, t4;
      x0 = s[0]; x1 = s[1]; x2 = s[2]; x3 = s[3]; x4 = s[4];
      x2 ^= 64'((15 - i) * 16 + i);
      x0 ^= x4; x4 ^= x3; x2 ^= x1;
      t0 = ~x0 & x1; t1 = ~x1 & x2; t2 = ~x2 & x3; t3 = ~x3 & x4; t4 = ~x4 & x0;
      x0 ^= t1; x1 ^= t2; x2 ^= t3; x3 ^= t4; x4 ^= t0;
      x1 ^= x0; x0 ^= x4; x3 ^= x2; x2 = ~x2;
      s[0] = x0 ^ rr(x0, 19) ^ rr(x0, 28);
      s[1] = x1 ^ rr(x1, 61) ^ rr(x1, 39);
      s[2] = x2 ^ rr(x2, 1) ^ rr(x2, 6);
      s[3] = x3 ^ rr(x3, 10) ^ rr(x3, 17);
      s[4] = x4 ^ rr(x4, 7) ^ rr(x4, 41);
    end
    return s;
  endfunction

  // Encrypts n words of p into c; returns the 128-bit tag.
  function automatic logic [127:0] encrypt(input logic [127:0] k, input logic [127:0] nonce,
                                           input logic [63:0] p[], output logic [63:0] c[]);
    state_t s;
    c = new[p.size()];
    s = {nonce[63:0], nonce[127:64], k[63:0], k[127:64], 64'h8040_0c06_0000_0000};
    s = perm(s, 12);
    s[3] ^= k[127:64];
    s[4] ^= k[63:0];
    s[4] ^= 64'd1;
    foreach (p[i]) begin
      s[0] ^= p[i];
      c[i] = s[0];
      s = perm(s, 6);
    end
    s[0] ^= 64'h8000_0000_0000_0000;
    s[1] ^= k[127:64];
    s[2] ^= k[63:0];
    s = perm(s, 12);
    return {s[3] ^ k[127:64], s[4] ^ k[63:0]};
  endfunction
endpackage
