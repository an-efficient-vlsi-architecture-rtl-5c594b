// ppg: partial product generator of the VHBCSE multiplier.
//
// The coefficient is cut into eight 2-bit binary common subexpressions. The
// patterns '01' and '10' need only a shift of the input, the pattern '11'
// needs one adder: P8 = Xin + Xin/2 (17 bits). The '11' partial products of
// the lower groups are hardwired right shifts of P8: P7 = P8>>2 (15 bits),
// P6 = P8>>4 (13), P5 = P8>>6 (11), P4 = P8>>8 (9), P3 = P8>>10 (7),
// P2 = P8>>12 (5), P1 = P8>>14 (3). p[i] holds Pi zero-extended to 17 bits.
// Xin is the unsigned input magnitude. Purely combinational. The structure
// and widths are those of the original architecture.
module ppg (
  input  logic [15:0] xin,
  output logic [16:0] p [1:8]
);
  logic [16:0] p8;

  always_comb begin
    p8 = {1'b0, xin} + {2'b00, xin[15:1]};   // the only adder (A0)
    for (int i = 1; i <= 8; i++)
      p[i] = p8 >> (2 * (8 - i));
  end
endmodule
