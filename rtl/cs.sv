// cs: coefficient selector (CS). Hands the final accumulation unit, for every
// tap, the product that belongs to the current output phase.
//
// Per tap, three selectors run side by side: the products of phases 0..3
// feed a 4:1 mux steered by the 0..3 phase counter, phases 0..5 a 6:1 mux
// steered by the 0..5 counter and phases 0..7 an 8:1 mux steered by the 0..7
// counter. Before the muxes each product is ANDed with the tap's SFTOUT bit,
// so taps not yet filled since reset contribute zero. A 3:1 mux steered by
// INTP_SEL picks one of the three results and a register holds it as PEOUT.
// Latency: one clock from counter value to PEOUT. The mux tree, ANDING and
// register follow the original architecture; sharing the counters with the
// data generator (they live in rate_gen) and reading SFTOUT as a tap-valid
// bit are this design's choices.
module cs
  import rrc_pkg::*;
#(
  parameter int unsigned N = TAPS
) (
  input  logic         clk,
  input  logic         rst,
  input  sample_t      prod   [N][LMAX],
  input  logic [N-1:0] sftout,
  input  logic [1:0]   cnt4,
  input  logic [2:0]   cnt6,
  input  logic [2:0]   cnt8,
  input  logic [1:0]   intp_sel,
  output sample_t      peout  [N]
);
  for (genvar k = 0; k < N; k++) begin : g_tap
    sample_t gated [LMAX];
    sample_t s4, s6, s8, sel;

    always_comb begin
      for (int p = 0; p < LMAX; p++)
        gated[p] = prod[k][p] & {DW{sftout[k]}};       // ANDING
      s4 = gated[{1'b0, cnt4}];                                // 4:1 mux
      s6 = (cnt6 < 3'd6) ? gated[cnt6] : '0;           // 6:1 mux
      s8 = gated[cnt8];                                // 8:1 mux
      case (intp_sel)                                  // 3:1 mux
        INTP_L4: sel = s4;
        INTP_L6: sel = s6;
        default: sel = s8;
      endcase
    end

    always_ff @(posedge clk) begin
      if (rst) peout[k] <= '0;
      else     peout[k] <= sel;
    end
  end
endmodule
