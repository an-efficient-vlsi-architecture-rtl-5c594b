// rrc_pkg: types, sizes and coefficient tables shared by the reconfigurable
// root-raised-cosine (RRC) interpolation filter.
//
// Sizes: RRCIN and RRCOUT are 16-bit two's complement; coefficients are
// 17-bit words H[16:0] whose MSB is the sign and whose low 16 bits are the
// magnitude in ones' complement form (inverted when negative), so that the
// sign conversion block recovers the exact magnitude by inverting the bits.
// The magnitude is a pure fraction with 16 fraction bits.
//
// The filter has TAPS = 7 taps per polyphase branch, so the prototype filter
// for interpolation factor L has N = 7*L coefficients (28, 42, 56). For each L
// there are two sets, roll-off 0.22 (UMTS / WCDMA) and 0.35 (DVB). The number
// of taps, the roll-off values and the coefficient values are this design's
// choice; the 16-bit data and the 17-bit signed coefficient format come from
// the architecture description.
//
// Coefficient formula (t in symbol periods, beta = roll-off):
//   h(t) = [sin(pi t (1-beta)) + 4 beta t cos(pi t (1+beta))] / [pi t (1 - (4 beta t)^2)]
//   h(0) = 1 - beta + 4 beta / pi
//   h(+-1/(4 beta)) = beta/sqrt(2) [(1+2/pi) sin(pi/(4 beta)) + (1-2/pi) cos(pi/(4 beta))]
// sampled at t = (i - (N-1)/2) / L for i = 0..N-1, then scaled so that the
// largest sum of |h| over one polyphase branch is 0.99 (the 16-bit output can
// never overflow), and rounded to 16 fraction bits.
package rrc_pkg;

  localparam int unsigned DW   = 16;  // data width (RRCIN, products, RRCOUT)
  localparam int unsigned CW   = 17;  // coefficient width, sign + 16 bits
  localparam int unsigned MW   = 16;  // coefficient magnitude width (Hm)
  localparam int unsigned TAPS = 7;   // taps per polyphase branch
  localparam int unsigned LMAX = 8;   // largest interpolation factor

  typedef logic        [CW-1:0] coef_t;
  typedef logic signed [DW-1:0] sample_t;

  // INTP_SEL encoding; 2'b11 is treated like INTP_L8.
  localparam logic [1:0] INTP_L4 = 2'b00;
  localparam logic [1:0] INTP_L6 = 2'b01;
  localparam logic [1:0] INTP_L8 = 2'b10;

  // FLT_SEL encoding
  localparam logic FLT_R22 = 1'b0;    // roll-off 0.22
  localparam logic FLT_R35 = 1'b1;    // roll-off 0.35

  function automatic int unsigned intp_factor(logic [1:0] sel);
    case (sel)
      INTP_L4: return 4;
      INTP_L6: return 6;
      default: return 8;
    endcase
  endfunction

  localparam coef_t H4_22 [28] = '{
    17'h1F997, 17'h1F8AF, 17'h1FDC8, 17'h006E5, 17'h00DF1, 17'h00C40, 17'h1FF98, 17'h1ED89,
    17'h1E22E, 17'h1EA3C, 17'h00B41, 17'h03EB0, 17'h0733B, 17'h0945F, 17'h0945F, 17'h0733B,
    17'h03EB0, 17'h00B41, 17'h1EA3C, 17'h1E22E, 17'h1ED89, 17'h1FF98, 17'h00C40, 17'h00DF1,
    17'h006E5, 17'h1FDC8, 17'h1F8AF, 17'h1F997
  };

  localparam coef_t H4_35 [28] = '{
    17'h00031, 17'h1FCB8, 17'h1FBE8, 17'h0007A, 17'h00825, 17'h00BB5, 17'h00450, 17'h1F2B1,
    17'h1E26F, 17'h1E50F, 17'h006B3, 17'h04389, 17'h08639, 17'h0B1CF, 17'h0B1CF, 17'h08639,
    17'h04389, 17'h006B3, 17'h1E50F, 17'h1E26F, 17'h1F2B1, 17'h00450, 17'h00BB5, 17'h00825,
    17'h0007A, 17'h1FBE8, 17'h1FCB8, 17'h00031
  };

  localparam coef_t H6_22 [42] = '{
    17'h1FA49, 17'h1F88C, 17'h1F933, 17'h1FC95, 17'h0021E, 17'h0084D, 17'h00D0C, 17'h00E4C,
    17'h00AB6, 17'h0024D, 17'h1F6B5, 17'h1EB14, 17'h1E367, 17'h1E391, 17'h1EE42, 17'h00415,
    17'h02318, 17'h046FC, 17'h069E2, 17'h08591, 17'h094DF, 17'h094DF, 17'h08591, 17'h069E2,
    17'h046FC, 17'h02318, 17'h00415, 17'h1EE42, 17'h1E391, 17'h1E367, 17'h1EB14, 17'h1F6B5,
    17'h0024D, 17'h00AB6, 17'h00E4C, 17'h00D0C, 17'h0084D, 17'h0021E, 17'h1FC95, 17'h1F933,
    17'h1F88C, 17'h1FA49
  };

  localparam coef_t H6_35 [42] = '{
    17'h000B8, 17'h1FE6A, 17'h1FC54, 17'h1FBBF, 17'h1FD8C, 17'h001AB, 17'h006D6, 17'h00AD4,
    17'h00B35, 17'h00655, 17'h1FC57, 17'h1EFA3, 17'h1E4A4, 17'h1E0BC, 17'h1E8AA, 17'h1FEDF,
    17'h02249, 17'h04E0E, 17'h07A72, 17'h09EA0, 17'h0B2EE, 17'h0B2EE, 17'h09EA0, 17'h07A72,
    17'h04E0E, 17'h02249, 17'h1FEDF, 17'h1E8AA, 17'h1E0BC, 17'h1E4A4, 17'h1EFA3, 17'h1FC57,
    17'h00655, 17'h00B35, 17'h00AD4, 17'h006D6, 17'h001AB, 17'h1FD8C, 17'h1FBBF, 17'h1FC54,
    17'h1FE6A, 17'h000B8
  };

  localparam coef_t H8_22 [56] = '{
    17'h1FAA5, 17'h1F8FE, 17'h1F882, 17'h1F981, 17'h1FC0A, 17'h1FFDE, 17'h00472, 17'h008FB,
    17'h00C8E, 17'h00E49, 17'h00D7F, 17'h009DD, 17'h00390, 17'h1FB46, 17'h1F234, 17'h1E9E9,
    17'h1E41F, 17'h1E280, 17'h1E65D, 17'h1F075, 17'h000C9, 17'h01686, 17'h03013, 17'h04B38,
    17'h0655F, 17'h07BE2, 17'h08C64, 17'h0951E, 17'h0951E, 17'h08C64, 17'h07BE2, 17'h0655F,
    17'h04B38, 17'h03013, 17'h01686, 17'h000C9, 17'h1F075, 17'h1E65D, 17'h1E280, 17'h1E41F,
    17'h1E9E9, 17'h1F234, 17'h1FB46, 17'h00390, 17'h009DD, 17'h00D7F, 17'h00E49, 17'h00C8E,
    17'h008FB, 17'h00472, 17'h1FFDE, 17'h1FC0A, 17'h1F981, 17'h1F882, 17'h1F8FE, 17'h1FAA5
  };

  localparam coef_t H8_35 [56] = '{
    17'h000F5, 17'h1FF52, 17'h1FD8C, 17'h1FC2B, 17'h1FBB8, 17'h1FC96, 17'h1FEDE, 17'h00249,
    17'h0062D, 17'h00997, 17'h00B76, 17'h00ADA, 17'h00736, 17'h00095, 17'h1F7BB, 17'h1EE24,
    17'h1E5DB, 17'h1E12C, 17'h1E242, 17'h1EABD, 17'h1FB56, 17'h0139A, 17'h031DD, 17'h05361,
    17'h074A6, 17'h091E9, 17'h0A7AE, 17'h0B34A, 17'h0B34A, 17'h0A7AE, 17'h091E9, 17'h074A6,
    17'h05361, 17'h031DD, 17'h0139A, 17'h1FB56, 17'h1EABD, 17'h1E242, 17'h1E12C, 17'h1E5DB,
    17'h1EE24, 17'h1F7BB, 17'h00095, 17'h00736, 17'h00ADA, 17'h00B76, 17'h00997, 17'h0062D,
    17'h00249, 17'h1FEDE, 17'h1FC96, 17'h1FBB8, 17'h1FC2B, 17'h1FD8C, 17'h1FF52, 17'h000F5
  };

endpackage
