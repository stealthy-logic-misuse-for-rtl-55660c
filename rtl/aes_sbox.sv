// aes_sbox: the AES SubBytes substitution for one byte, computed rather than
// tabulated.
//
// The output is the multiplicative inverse of the input in GF(2^8) modulo
// x^8+x^4+x^3+x+1 (0 maps to 0), followed by the FIPS-197 affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63. The inverse is
// x^254, formed from the squares x^2 .. x^128. Purely combinational.
// The AES core instantiates four of these, as the published design uses four
// S-boxes per clock cycle; the way the S-box is built is this design's own.
module aes_sbox (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  logic [7:0] sq [1:7];   // sq[k] = x^(2^k)
  logic [7:0] inv;

  always_comb begin
    sq[1] = gf_mul(in_byte, in_byte);
    for (int k = 2; k <= 7; k++) sq[k] = gf_mul(sq[k-1], sq[k-1]);
    // x^254 = x^2 * x^4 * x^8 * x^16 * x^32 * x^64 * x^128
    inv = sq[1];
    for (int k = 2; k <= 7; k++) inv = gf_mul(inv, sq[k]);
    out_byte = inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
  end

endmodule
