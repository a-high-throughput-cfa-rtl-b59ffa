// cfa_sbox: AES S-box and inverse S-box built with composite field
// arithmetic (CFA) in GF(((2^2)^2)^2) instead of a lookup table.
//
// Forward: the byte is mapped into the composite field by the isomorphic
// mapping delta, inverted there, and mapped back by a matrix that merges
// delta^-1 with the affine transform (plus the constant 8'h63).
// Inverse: the inverse affine transform is merged with delta (plus the mapped
// constant), the element is inverted, and delta^-1 brings it back.
// Both directions share one inverter. In the composite field an element is
// S_h*x + S_l, x a root of P2(x) = x^2 + x + LAMBDA, and
//   (S_h*x + S_l)^-1 = S_h*T*x + (S_h + S_l)*T,  T = (S_h^2*LAMBDA + S_h*S_l + S_l^2)^-1
// with T computed by gf16_inv. The structure (mapping, subfield inversion,
// merged inverse mapping and affine transform) follows the design; the field
// constants and the chosen mapping are this design's (see aes_pkg).
// Interface: dec = 0 gives S-box(din), dec = 1 gives InvS-box(din).
// Timing: purely combinational.
module cfa_sbox
  import aes_pkg::*;
(
  input  byte_t din,
  input  logic  dec,
  output byte_t dout
);
  byte_t      mapped, inv;
  logic [3:0] sh, sl, d, t;

  always_comb begin
    mapped = dec ? (mat_mul(MAP_AFF_INV, din) ^ AFF_C_MAPPED) : mat_mul(MAP_FWD, din);
    sh = mapped[7:4];
    sl = mapped[3:0];
    d  = gf16_mul(gf16_sq(sh), LAMBDA) ^ gf16_mul(sh, sl) ^ gf16_sq(sl);
  end

  gf16_inv u_inv (.a(d), .a_inv(t));

  always_comb begin
    inv  = {gf16_mul(sh, t), gf16_mul(sh ^ sl, t)};
    dout = dec ? mat_mul(MAP_INV, inv) : (mat_mul(MAP_INV_AFF, inv) ^ AFF_C);
  end
endmodule
