// mux_l1: multiplexer unit at layer 1 of the VHBCSE multiplier.
//
// Eight 4:1 multiplexers, one per 2-bit group of Hm. Group j (j = 0 for
// Hm[15:14] ... j = 7 for Hm[1:0]) selects, by its two coefficient bits:
//   00 -> 0, 01 -> Xin >> (2j+1), 10 -> Xin >> 2j, 11 -> P(8-j)
// so pp[j] = floor(v * Xin / 2^(2j+1)) with v the group's value. Output
// widths are 17, 15, 13, 11, 9, 7, 5, 3 bits for j = 0..7 (held
// zero-extended in 17 bits). Purely combinational. Mux count, inputs and
// widths follow the original architecture; the pattern-to-input mapping
// follows from the bit weights.
module mux_l1 (
  input  logic [15:0] xin,
  input  logic [16:0] p  [1:8],
  input  logic [15:0] hm,
  output logic [16:0] pp [0:7]
);
  always_comb begin
    for (int j = 0; j < 8; j++) begin
      case (hm[15 - 2*j -: 2])
        2'b00:   pp[j] = '0;
        2'b01:   pp[j] = {1'b0, xin >> (2*j + 1)};
        2'b10:   pp[j] = {1'b0, xin >> (2*j)};
        default: pp[j] = p[8 - j];
      endcase
    end
  end
endmodule
