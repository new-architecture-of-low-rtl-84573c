// gf4_inv: multiplicative inverse of a nibble in GF((2^2)^2) with phi = {10}
// ("X^-1"). Zero maps to zero.
//
// Instead of the usual decomposition into GF(2^2) operations, each output
// bit is a short sum of products of the input bits, using AND, NAND, OR
// and XOR gates:
//   theta3 = g3&~g0  ^  g2&~(g3&g1)
//   theta2 = g3&(g0|g2)  ^  g2&~g3&~g1
//   theta1 = g1&~(g3&g2)  ^  g3&~(g1&g0)  ^  g2&~g0
//   theta0 = (g0^g1)&~g3&~g2  ^  g2&(~g0|g1)  ^  g3&g1&g0
// The first three follow the design's formulation; theta0 carries the extra
// product g3&g1&g0 and the OR term (~g0|g1), which this implementation
// needed to make the function a true inverse for all 16 inputs.
// Interface: gamma (4 bits) in, theta (4 bits) out.
// Timing: purely combinational, three gate levels deep.
module gf4_inv
  import aes_sbox_pkg::*;
(
  input  nibble_t gamma,
  output nibble_t theta
);

  logic g3, g2, g1, g0;
  assign {g3, g2, g1, g0} = gamma;

  always_comb begin
    theta[3] = (g3 & ~g0) ^ (g2 & ~(g3 & g1));
    theta[2] = (g3 & (g0 | g2)) ^ (g2 & ~g3 & ~g1);
    theta[1] = (g1 & ~(g3 & g2)) ^ (g3 & ~(g1 & g0)) ^ (g2 & ~g0);
    theta[0] = ((g0 ^ g1) & ~g3 & ~g2) ^ (g2 & (~g0 | g1)) ^ (g3 & g1 & g0);
  end

endmodule
