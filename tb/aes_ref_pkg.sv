// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for the
// multiplicative inverse (y with x*y = 1 in GF(2^8)) and applying the affine
// map; the key schedule is expanded in full before the rounds, and the rounds
// work on a byte array. Bytes are in FIPS-197 order (byte 0 = bits [127:120]).
package aes_ref_pkg;

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv = 8'h00;
    logic [7:0] r;
    for (int y = 1; y < 256; y++) if (ref_mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    r = 8'h63;
    for (int i = 0; i < 8; i++)
      r[i] = r[i] ^ inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return r;
  endfunction

  function automatic logic [127:0] ref_aes128(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0]  st [16];
    logic [7:0]  tmp [16];
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    logic [127:0] out;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0]), ref_sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int i = 0; i < 16; i++) st[i] = pt[127 - 8*i -: 8] ^ w[i/4][31 - 8*(i%4) -: 8];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) st[i] = ref_sbox(st[i]);
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++)
        tmp[4*c + row] = st[4*((c + row) % 4) + row];
      for (int c = 0; c < 4; c++) begin
        if (r != 10) begin
          st[4*c+0] = ref_mul(tmp[4*c+0], 2) ^ ref_mul(tmp[4*c+1], 3) ^ tmp[4*c+2] ^ tmp[4*c+3];
          st[4*c+1] = tmp[4*c+0] ^ ref_mul(tmp[4*c+1], 2) ^ ref_mul(tmp[4*c+2], 3) ^ tmp[4*c+3];
          st[4*c+2] = tmp[4*c+0] ^ tmp[4*c+1] ^ ref_mul(tmp[4*c+2], 2) ^ ref_mul(tmp[4*c+3], 3);
          st[4*c+3] = ref_mul(tmp[4*c+0], 3) ^ tmp[4*c+1] ^ tmp[4*c+2] ^ ref_mul(tmp[4*c+3], 2);
        end else begin
          for (int row = 0; row < 4; row++) st[4*c+row] = tmp[4*c+row];
        end
      end
      for (int i = 0; i < 16; i++) st[i] ^= w[4*r + i/4][31 - 8*(i%4) -: 8];
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = st[i];
    return out;
  endfunction

endpackage
