// scp: second coding pass of the coefficient generator.
//
// A second set of multiplexers, steered by INTP_SEL, picks the coefficient
// set of the active interpolation factor L out of the first pass outputs and
// lays it out in polyphase order: h[k][p] = C_L[k*L + p], the coefficient
// that multiplies the sample k input periods old for output phase p. Slots
// with p >= L are zero. Purely combinational. The INTP_SEL mux is the
// original architecture's; the polyphase layout and the INTP_SEL encoding are
// this design's.
module scp
  import rrc_pkg::*;
(
  input  coef_t      c4 [4*TAPS],
  input  coef_t      c6 [6*TAPS],
  input  coef_t      c8 [8*TAPS],
  input  logic [1:0] intp_sel,
  output coef_t      h  [TAPS][LMAX]
);
  always_comb begin
    for (int k = 0; k < TAPS; k++)
      for (int p = 0; p < LMAX; p++) begin
        h[k][p] = '0;
        case (intp_sel)
          INTP_L4: if (p < 4) h[k][p] = c4[k*4 + p];
          INTP_L6: if (p < 6) h[k][p] = c6[k*6 + p];
          default:            h[k][p] = c8[k*8 + p];
        endcase
      end
  end
endmodule
