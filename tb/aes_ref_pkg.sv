// aes_ref_pkg: reference AES-128 encryption for the testbenches. Its S-box is
// built independently of the RTL: the multiplicative inverse is found by
// search over all 256 bytes, then the AES affine map is applied bit by bit.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] xt(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = xt(a);
    end
    return p;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] inv, s;
    inv = 0;
    for (int c = 1; c < 256; c++) if (mul(a, 8'(c)) == 8'h01) inv = 8'(c);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  // state byte i = row i%4, column i/4 (FIPS-197 input order)
  function automatic bytes16_t encrypt(input bytes16_t pt, input bytes16_t key);
    logic [7:0] w [176];
    logic [7:0] s [16];
    logic [7:0] t [16];
    logic [7:0] rc, tmp0;
    for (int i = 0; i < 16; i++) w[i] = key[i];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      logic [7:0] a [4];
      for (int j = 0; j < 4; j++) a[j] = w[4*(i-1)+j];
      if (i % 4 == 0) begin
        tmp0 = a[0];
        a[0] = ref_sbox(a[1]) ^ rc; a[1] = ref_sbox(a[2]);
        a[2] = ref_sbox(a[3]);      a[3] = ref_sbox(tmp0);
        rc = xt(rc);
      end
      for (int j = 0; j < 4; j++) w[4*i+j] = w[4*(i-4)+j] ^ a[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[i] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) t[i] = ref_sbox(s[i]);
      for (int c = 0; c < 4; c++)
        for (int rr = 0; rr < 4; rr++) s[4*c+rr] = t[4*((c+rr)%4)+rr];
      if (r != 10)
        for (int c = 0; c < 4; c++) begin
          logic [7:0] a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = xt(a0) ^ xt(a1) ^ a1 ^ a2 ^ a3;
          s[4*c+1] = a0 ^ xt(a1) ^ xt(a2) ^ a2 ^ a3;
          s[4*c+2] = a0 ^ a1 ^ xt(a2) ^ xt(a3) ^ a3;
          s[4*c+3] = xt(a0) ^ a0 ^ a1 ^ a2 ^ xt(a3);
        end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r+i];
    end
    return s;
  endfunction

endpackage
