// rrc_interp_top: reconfigurable root-raised-cosine pulse-shaping
// interpolation filter for a multistandard digital up-converter.
//
// One 16-bit sample enters every L clocks (L = 4, 6 or 8 by INTP_SEL) and one
// 16-bit filtered sample leaves every clock. The filter is the polyphase form
// of a 7*L-tap RRC filter with roll-off 0.22 or 0.35 (FLT_SEL):
//   rrcout[n = m*L + p] = sum_{k=0..6} h[k*L + p] * x[m - k]
// Blocks: rate_gen (CLK/4, /6, /8 enables and phase counters), data_gen
// (input sampling, tap delay line), cg (coefficient selection and VHBCSE
// multipliers), cs (per-tap phase selection, PEOUT register) and fa
// (carry-skip accumulation, RRCOUT register).
//
// Timing: rrcin_take is high in the cycle whose rising edge samples rrcin.
// Counting that edge as edge 0, output phase p of that sample is on rrcout
// after edge p + 3 (one clock of phase counting, one for PEOUT, one for
// RRCOUT). Reset (rst, synchronous, active high) clears the delay line,
// counters and output registers. Changing INTP_SEL or FLT_SEL takes effect
// at once; the samples already in the line are then filtered with the new
// coefficients until they have shifted out.
module rrc_interp_top
  import rrc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       flt_sel,     // 0: roll-off 0.22, 1: roll-off 0.35
  input  logic [1:0] intp_sel,    // 00: L=4, 01: L=6, 10/11: L=8
  input  sample_t    rrcin,
  output logic       rrcin_take,
  output sample_t    rrcout
);
  logic [1:0]      cnt4;
  logic [2:0]      cnt6, cnt8;
  logic            ce4, ce6, ce8;
  sample_t         x      [TAPS];
  logic [TAPS-1:0] sftout;
  sample_t         prod   [TAPS][LMAX];
  sample_t         peout  [TAPS];

  rate_gen u_rate (.clk, .rst, .cnt4, .cnt6, .cnt8, .ce4, .ce6, .ce8);

  data_gen #(.N(TAPS)) u_dg (
    .clk, .rst, .intp_sel, .ce4, .ce6, .ce8, .rrcin, .take(rrcin_take), .x, .sftout);

  cg u_cg (.x, .flt_sel, .intp_sel, .prod);

  cs #(.N(TAPS)) u_cs (
    .clk, .rst, .prod, .sftout, .cnt4, .cnt6, .cnt8, .intp_sel, .peout);

  fa #(.N(TAPS)) u_fa (.clk, .rst, .peout, .rrcout);
endmodule
