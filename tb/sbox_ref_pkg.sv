// sbox_ref_pkg: reference arithmetic for the S-box testbenches, written
// independently of the RTL: straightforward loop-based field operations
// instead of flattened gate equations or precomputed matrices.
//   - AES field GF(2^8) mod x^8 + x^4 + x^3 + x + 1 (shift-and-add multiply,
//     inverse by exhaustive search)
//   - AES affine / inverse affine from their rotate-and-XOR definitions
//   - the composite tower GF(2^2) -> GF(2^4) (phi = {10}) -> GF(2^8)
//     (lambda = {1000}) built level by level
//   - the isomorphism T from powers of beta = {7a}, T^-1 by search
package sbox_ref_pkg;

  localparam logic [7:0] BETA = 8'h7a;

  function automatic logic [7:0] aes_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 8'h00;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] aes_inv(input logic [7:0] a);
    for (int c = 1; c < 256; c++)
      if (aes_mul(a, 8'(c)) == 8'h01) return 8'(c);
    return 8'h00;
  endfunction

  function automatic logic [7:0] rotl(input logic [7:0] a, input int n);
    return 8'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic logic [7:0] aes_affine(input logic [7:0] b);
    return b ^ rotl(b, 1) ^ rotl(b, 2) ^ rotl(b, 3) ^ rotl(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] aes_inv_affine(input logic [7:0] s);
    return rotl(s, 1) ^ rotl(s, 3) ^ rotl(s, 6) ^ 8'h05;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return aes_affine(aes_inv(a));
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] s);
    return aes_inv(aes_inv_affine(s));
  endfunction

  // GF(2^2), x^2 = x + 1
  function automatic logic [1:0] gf2_mul(input logic [1:0] a, input logic [1:0] b);
    logic hh = a[1] & b[1];
    return {(a[1] & b[0]) ^ (a[0] & b[1]) ^ hh, (a[0] & b[0]) ^ hh};
  endfunction

  // GF((2^2)^2), y^2 = y + phi, phi = {10}
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh = gf2_mul(a[3:2], b[3:2]);
    logic [1:0] h  = gf2_mul(a[3:2], b[1:0]) ^ gf2_mul(a[1:0], b[3:2]) ^ hh;
    logic [1:0] l  = gf2_mul(a[1:0], b[1:0]) ^ gf2_mul(hh, 2'b10);
    return {h, l};
  endfunction

  function automatic logic [3:0] gf4_inv(input logic [3:0] a);
    for (int c = 1; c < 16; c++)
      if (gf4_mul(a, 4'(c)) == 4'h1) return 4'(c);
    return 4'h0;
  endfunction

  // GF(((2^2)^2)^2), z^2 = z + lambda, lambda = {1000}
  function automatic logic [7:0] gf8c_mul(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh = gf4_mul(a[7:4], b[7:4]);
    logic [3:0] h  = gf4_mul(a[7:4], b[3:0]) ^ gf4_mul(a[3:0], b[7:4]) ^ hh;
    logic [3:0] l  = gf4_mul(a[3:0], b[3:0]) ^ gf4_mul(hh, 4'b1000);
    return {h, l};
  endfunction

  // T: the AES-basis byte sum b_i x^i maps to sum b_i beta^i.
  function automatic logic [7:0] iso(input logic [7:0] b);
    logic [7:0] r = 8'h00;
    logic [7:0] p = 8'h01;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= p;
      p = gf8c_mul(p, BETA);
    end
    return r;
  endfunction

  function automatic logic [7:0] inv_iso(input logic [7:0] q);
    for (int c = 0; c < 256; c++)
      if (iso(8'(c)) == q) return 8'(c);
    return 8'h00;
  endfunction

endpackage
