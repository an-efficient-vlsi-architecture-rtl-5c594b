// add_l2: controlled addition at layer 2 of the VHBCSE multiplier.
//
// Adders A1..A4 add the layer-1 partial products in pairs, one pair per
// coefficient nibble: A1 = pp0+pp1 (Hm[15:12]), A2 = pp2+pp3 (Hm[11:8]),
// A3 = pp4+pp5 (Hm[7:4]), A4 = pp6+pp7 (Hm[3:0]). When two nibbles are equal
// (horizontal BCSE), the sum of the lower nibble is the sum of the upper one
// shifted right by 4 bits per nibble of distance, so six muxes M1..M6 steered
// by C1..C6 take the shifted upper sum instead:
//   AS1 = A1                                        (16 bits)
//   AS2 = C1 ? A1>>4 : A2                           (12 bits)
//   AS3 = C2 ? A1>>8 : (C3 ? A2>>4 : A3)            (8 bits)
//   AS4 = C4 ? A1>>12 : (C5 ? A2>>8 : (C6 ? A3>>4 : A4))  (4 bits)
// The widths hold for Xin <= 2^15. Purely combinational. Adders, muxes,
// controls and widths follow the original architecture; which shifted sum
// enters each mux (nearest equal higher nibble first) is this design's choice.
module add_l2 (
  input  logic [16:0] pp [0:7],
  input  logic [6:1]  c,          // C1..C6
  output logic [15:0] as1,
  output logic [11:0] as2,
  output logic [7:0]  as3,
  output logic [3:0]  as4
);
  logic [15:0] a1;
  logic [11:0] a2;
  logic [7:0]  a3;
  logic [3:0]  a4;
  logic [7:0]  m2;
  logic [3:0]  m4, m5;

  always_comb begin
    a1 = 16'(pp[0] + pp[1]);
    a2 = 12'(pp[2] + pp[3]);
    a3 = 8'(pp[4] + pp[5]);
    a4 = 4'(pp[6] + pp[7]);

    as1 = a1;
    as2 = c[1] ? 12'(a1 >> 4) : a2;                  // M1
    m2  = c[3] ? 8'(a2 >> 4)  : a3;                  // M2
    as3 = c[2] ? 8'(a1 >> 8)  : m2;                  // M3
    m4  = c[6] ? 4'(a3 >> 4)  : a4;                  // M4
    m5  = c[5] ? 4'(a2 >> 8)  : m4;                  // M5
    as4 = c[4] ? 4'(a1 >> 12) : m5;                  // M6
  end
endmodule
