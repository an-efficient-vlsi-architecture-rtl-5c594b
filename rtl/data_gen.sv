// data_gen: data generator (DG). Samples RRCIN at the input rate chosen by
// INTP_SEL and holds the last TAPS samples.
//
// When the sample enable of the selected rate (ce4, ce6 or ce8 from
// rate_gen) is high, RRCIN is shifted into x[0] and the older samples move
// one place down the line. A parallel valid line (SFTOUT) marks which taps
// already hold a sample taken since reset. take is high in the cycles whose
// clock edge samples RRCIN, so a source can present the next sample after
// it. Synchronous active-high reset clears both lines. Sampling at the rate
// chosen by INTP_SEL is the original architecture's; the seven-sample line,
// the valid bits and the take output are this design's.
module data_gen
  import rrc_pkg::*;
#(
  parameter int unsigned N = TAPS
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] intp_sel,
  input  logic       ce4,
  input  logic       ce6,
  input  logic       ce8,
  input  sample_t    rrcin,
  output logic       take,
  output sample_t    x      [N],
  output logic [N-1:0] sftout
);
  always_comb begin
    case (intp_sel)
      INTP_L4: take = ce4;
      INTP_L6: take = ce6;
      default: take = ce8;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) x[k] <= '0;
      sftout <= '0;
    end else if (take) begin
      x[0] <= rrcin;
      for (int k = 1; k < N; k++) x[k] <= x[k-1];
      sftout <= {sftout[N-2:0], 1'b1};
    end
  end
endmodule
