// cl_gen: control logic generator of the VHBCSE multiplier.
//
// The coefficient magnitude Hm[15:0] is split into the nibbles Hm[15:12],
// Hm[11:8], Hm[7:4], Hm[3:0]. Six comparators (XNOR per bit, AND of the
// four) flag equal nibble pairs:
//   C1: [15:12]=[11:8]  C2: [15:12]=[7:4]  C3: [11:8]=[7:4]
//   C4: [15:12]=[3:0]   C5: [11:8]=[3:0]   C6: [7:4]=[3:0]
// The 8-bit check Hm[15:8] = Hm[7:0] is built from two of them: C7 = C2 & C5.
// c[1]..c[7] hold C1..C7. Purely combinational. The comparator pairs follow
// the original architecture; forming C7 from C2 and C5 is this design's
// reading of how the 8-bit check reuses the 4-bit ones.
module cl_gen (
  input  logic [15:0] hm,
  output logic [7:1]  c
);
  function automatic logic nib_eq(logic [3:0] a, logic [3:0] b);
    return &(a ~^ b);
  endfunction

  always_comb begin
    c[1] = nib_eq(hm[15:12], hm[11:8]);
    c[2] = nib_eq(hm[15:12], hm[7:4]);
    c[3] = nib_eq(hm[11:8],  hm[7:4]);
    c[4] = nib_eq(hm[15:12], hm[3:0]);
    c[5] = nib_eq(hm[11:8],  hm[3:0]);
    c[6] = nib_eq(hm[7:4],   hm[3:0]);
    c[7] = c[2] & c[5];
  end
endmodule
