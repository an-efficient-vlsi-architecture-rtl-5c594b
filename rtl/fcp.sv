// fcp: first coding pass of the coefficient generator.
//
// For each interpolation factor (4, 6 and 8, in parallel) the two coefficient
// sets of equal length that differ only in roll-off (0.22 and 0.35) meet in a
// 2:1 multiplexer steered by FLT_SEL. The selection is written as vertical
// BCSE: the bits in which the two constant words agree are wired straight
// through and only the differing bits pass a mux, so hardware is spent only
// where the two filters differ. Outputs C4, C6, C8 are the selected sets in
// prototype order (index i = 0..N-1). Purely combinational. The two-set,
// three-factor structure is the original architecture's; the roll-off
// values and coefficient tables (rrc_pkg) are this design's.
module fcp
  import rrc_pkg::*;
(
  input  logic  flt_sel,                 // FLT_R22 / FLT_R35
  output coef_t c4 [4*TAPS],
  output coef_t c6 [6*TAPS],
  output coef_t c8 [8*TAPS]
);
  // shared bits of a and b hardwired, differing bits taken from the chosen one
  function automatic coef_t vbcse_sel(coef_t a, coef_t b, logic sel);
    coef_t diff;
    diff = a ^ b;
    return (a & ~diff) | (diff & (sel ? b : a));
  endfunction

  always_comb begin
    for (int i = 0; i < 4*TAPS; i++) c4[i] = vbcse_sel(H4_22[i], H4_35[i], flt_sel);
    for (int i = 0; i < 6*TAPS; i++) c6[i] = vbcse_sel(H6_22[i], H6_35[i], flt_sel);
    for (int i = 0; i < 8*TAPS; i++) c8[i] = vbcse_sel(H8_22[i], H8_35[i], flt_sel);
  end
endmodule
