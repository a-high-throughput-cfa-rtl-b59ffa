// gf16_inv: multiplicative inverse in GF((2^2)^2), the innermost step of the
// composite-field S-box.
//
// An element is a_h*y + a_l with a_h, a_l in GF(2^2) and y a root of
// P1(y) = y^2 + y + PHI. The same inversion identity that the S-box uses one
// level up gives
//   (a_h*y + a_l)^-1 = a_h*t*y + (a_h + a_l)*t,  t = (a_h^2*PHI + a_h*a_l + a_l^2)^-1
// and in GF(2^2) the inverse of t is its square, a pure rewiring. Zero maps
// to zero. Purely combinational. The formula follows the design's inversion
// equation; PHI = 2'b11 is this design's choice (see aes_pkg).
module gf16_inv
  import aes_pkg::*;
(
  input  logic [3:0] a,     // element of GF(2^4), {a_h, a_l}
  output logic [3:0] a_inv  // its inverse, 0 for 0
);
  logic [1:0] ah, al, d, t;

  always_comb begin
    ah = a[3:2];
    al = a[1:0];
    d  = gf4_mul(gf4_sq(ah), PHI) ^ gf4_mul(ah, al) ^ gf4_sq(al);
    t  = gf4_sq(d);
    a_inv = {gf4_mul(ah, t), gf4_mul(ah ^ al, t)};
  end
endmodule
