// fa: final data accumulation unit (FA). Adds the selected products of all
// taps into one output sample.
//
// The N PEOUT values are sign-extended to AW = 16 + clog2(N) bits and summed
// by a chain of carry-skip adders, then saturated to 16 bits and registered
// as RRCOUT. With the shipped coefficient sets the sum always fits 16 bits;
// the saturation (this design's choice) only guards other sets. Latency: one
// clock from PEOUT to RRCOUT.
module fa
  import rrc_pkg::*;
#(
  parameter int unsigned N = TAPS
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t peout  [N],
  output sample_t rrcout
);
  localparam int unsigned AW = DW + $clog2(N);

  logic signed [AW-1:0] part [N];
  logic signed [AW-1:0] ext  [N];

  always_comb
    for (int k = 0; k < N; k++) ext[k] = AW'(peout[k]);

  assign part[0] = ext[0];
  for (genvar k = 1; k < N; k++) begin : g_add
    logic unused_cout;
    csk_adder #(.W(AW), .BLK(4)) u_add (
      .a(part[k-1]), .b(ext[k]), .cin(1'b0), .s(part[k]), .cout(unused_cout));
  end

  localparam logic signed [AW-1:0] MAXV = AW'(sample_t'({1'b0, {(DW-1){1'b1}}}));
  localparam logic signed [AW-1:0] MINV = AW'(sample_t'({1'b1, {(DW-1){1'b0}}}));

  sample_t sat;
  always_comb begin
    if (part[N-1] > MAXV)      sat = sample_t'(MAXV);
    else if (part[N-1] < MINV) sat = sample_t'(MINV);
    else                       sat = sample_t'(part[N-1]);
  end

  always_ff @(posedge clk) begin
    if (rst) rrcout <= '0;
    else     rrcout <= sat;
  end
endmodule
