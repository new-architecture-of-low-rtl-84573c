// aes_sbox_pkg: types and constants shared by the composite-field AES S-box.
//
// Field tower used throughout (polynomial basis at every level):
//   GF(2^2)         = GF(2)[x]   / (x^2 + x + 1)
//   GF((2^2)^2)     = GF(2^2)[y] / (y^2 + y + phi),    phi    = {10}   = x
//   GF(((2^2)^2)^2) = GF(2^4)[z] / (z^2 + z + lambda), lambda = {1000} = x*y
// A composite byte is {q, w} = q*z + w: q (bits 7:4) is the high nibble and
// w (bits 3:0) the low one. phi and lambda are the constants the design is
// built around; the bit ordering inside a nibble (bits 3:2 are the y
// coefficient) is this implementation's choice.
//
// The isomorphism T sends the AES generator x (byte {02}) to the composite
// element beta = {7a}, one of the eight roots of x^8 + x^4 + x^3 + x + 1 in
// the composite field; column i of T is beta^i. Of the eight roots, {7a} is
// the one for which T and A*T^-1 (A the affine matrix) together hold 54 ones,
// the figure the design quotes for its transformation matrices. The rows
// below follow from that choice:
//   T_ROWS    : q  = T * b
//   TINV_ROWS : b  = T^-1 * q
//   IAFF_ROWS : inverse affine moved into the composite domain,
//               T * A^-1 * T^-1, with constant IAFF_C = T * A^-1 * {63}
//   AFF_ROWS  : the AES affine matrix A, with constant AFF_C = {63}
// Row r (index r) is the mask of input bits XORed into output bit r.
package aes_sbox_pkg;

  typedef logic [3:0] nibble_t;
  typedef logic [7:0] byte_t;
  typedef byte_t      mat8_t [8];

  localparam mat8_t T_ROWS = '{
    8'b00000101, 8'b11000010, 8'b00100100, 8'b11001010,
    8'b10100010, 8'b01110010, 8'b01111110, 8'b10100000};

  localparam mat8_t TINV_ROWS = '{
    8'b01101011, 8'b10010000, 8'b01101010, 8'b00001010,
    8'b10100010, 8'b01101110, 8'b01111100, 8'b11101110};

  localparam mat8_t IAFF_ROWS = '{
    8'b00110110, 8'b01011100, 8'b11111010, 8'b00110011,
    8'b01110101, 8'b11010010, 8'b01100001, 8'b01101000};
  localparam byte_t IAFF_C = 8'h44;

  localparam mat8_t AFF_ROWS = '{
    8'b11110001, 8'b11100011, 8'b11000111, 8'b10001111,
    8'b00011111, 8'b00111110, 8'b01111100, 8'b11111000};
  localparam byte_t AFF_C = 8'h63;

  // GF(2) matrix-vector product: output bit r is the parity of rows[r] & v.
  function automatic byte_t mat_vec(input mat8_t rows, input byte_t v);
    byte_t r;
    for (int i = 0; i < 8; i++) r[i] = ^(rows[i] & v);
    return r;
  endfunction

endpackage
