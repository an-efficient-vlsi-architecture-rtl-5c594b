// cg: coefficient generator block. Multiplies every tap of the input delay
// line by the coefficients of every output phase.
//
// The first coding pass (FLT_SEL, roll-off) and the second coding pass
// (INTP_SEL, interpolation factor) pick the coefficient h[k][p] for tap k and
// phase p. Each coefficient passes the sign conversion block and drives its
// own VHBCSE multiplier together with the magnitude of tap k's sample; the
// sign of the product, coefficient sign XOR sample sign, is restored by a
// two's complement negation. The sample magnitude is taken once per tap with
// an exact two's complement negation (this design's choice; the source only
// says that signed input data is supported).
//   prod[k][p] ~= x[k] * h[k][p]   (16-bit two's complement, truncated
//                                    towards zero by at most 4 LSB)
// Purely combinational.
module cg
  import rrc_pkg::*;
(
  input  sample_t    x        [TAPS],        // delay line, x[0] newest
  input  logic       flt_sel,
  input  logic [1:0] intp_sel,
  output sample_t    prod     [TAPS][LMAX]
);
  coef_t c4 [4*TAPS];
  coef_t c6 [6*TAPS];
  coef_t c8 [8*TAPS];
  coef_t h  [TAPS][LMAX];

  fcp u_fcp (.flt_sel, .c4, .c6, .c8);
  scp u_scp (.c4, .c6, .c8, .intp_sel, .h);

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic [15:0] xmag;
    logic        xneg;

    always_comb begin
      xneg = x[k][DW-1];
      xmag = xneg ? 16'(-x[k]) : 16'(x[k]);
    end

    for (genvar p = 0; p < LMAX; p++) begin : g_phase
      logic [MW-1:0] hm;
      logic          hneg;
      logic [15:0]   cf;

      sign_conv   u_sc  (.h(h[k][p]), .hm, .neg(hneg));
      vhbcse_mult u_mul (.xin(xmag), .hm, .cf);

      always_comb prod[k][p] = (xneg ^ hneg) ? -sample_t'(cf) : sample_t'(cf);
    end
  end
endmodule
