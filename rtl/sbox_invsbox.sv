// sbox_invsbox: AES SubBytes / InvSubBytes on one byte with a single shared
// composite-field inverter.
//
// Data path (enc_dec selects the two multiplexers):
//   data_in -> Map T -> [inv_affine when decrypting] -> mult_inverse
//           -> Inv Map T^-1 -> [affine when encrypting] -> data_out
// Encrypt: data_out = A * inv(data_in) + {63}        (S-box)
// Decrypt: data_out = inv(A^-1 * (data_in + {63}))   (inverse S-box)
// The inverse affine step is done in the composite field, right after
// Map T, so that both directions share Map T, the inverter and T^-1. The
// block order and the two multiplexers follow the design; the polarity of
// enc_dec (1 = encrypt, 0 = decrypt) follows the multiplexer input numbers
// of its block diagram.
// Interface: data_in (8), enc_dec (1) in; data_out (8) out, matching the
// chip's Data_In0..7, Enc/Dec and Data_Out0..7 pins.
// Timing: purely combinational, no clock and no reset; one byte per
// evaluation.
module sbox_invsbox
  import aes_sbox_pkg::*;
(
  input  byte_t data_in,
  input  logic  enc_dec,
  output byte_t data_out
);

  byte_t q_map, q_iaff, q_sel, q_inv, b_inv, s_aff;

  iso_map u_map (
    .b (data_in),
    .q (q_map)
  );

  inv_affine u_inv_affine (
    .q_in  (q_map),
    .q_out (q_iaff)
  );

  // Input multiplexer: 0 = through the inverse affine, 1 = direct.
  assign q_sel = enc_dec ? q_map : q_iaff;

  mult_inverse u_mult_inverse (
    .a     (q_sel),
    .a_inv (q_inv)
  );

  inv_iso_map u_inv_map (
    .q (q_inv),
    .b (b_inv)
  );

  affine u_affine (
    .b (b_inv),
    .s (s_aff)
  );

  // Output multiplexer: 0 = direct, 1 = through the affine transformation.
  assign data_out = enc_dec ? s_aff : b_inv;

endmodule
