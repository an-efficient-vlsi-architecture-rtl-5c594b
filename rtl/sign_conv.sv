// sign_conv: sign conversion of one filter coefficient.
//
// The coefficient H[16:0] carries its sign in H[16]. A ones' complementer
// inverts the 16 low bits and a 16-bit 2:1 multiplexer, steered by H[16],
// passes either the inverted or the plain bits on as the magnitude Hm[15:0]
// that drives the unsigned VHBCSE multiplier. The sign is passed on so that
// the product can be negated afterwards. Coefficients are stored in ones'
// complement form (see rrc_pkg), so Hm is the exact magnitude.
// Purely combinational.
module sign_conv
  import rrc_pkg::*;
(
  input  coef_t          h,     // coefficient, H[16] = sign
  output logic [MW-1:0]  hm,    // magnitude Hm[15:0]
  output logic           neg    // coefficient is negative
);
  logic [MW-1:0] h_inv;

  always_comb begin
    h_inv = ~h[MW-1:0];                 // 1's complementer
    neg   = h[CW-1];
    hm    = neg ? h_inv : h[MW-1:0];    // 2:1 mux on the MSB
  end
endmodule
