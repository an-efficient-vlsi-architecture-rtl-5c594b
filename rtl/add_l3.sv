// add_l3: controlled addition at layer 3 of the VHBCSE multiplier.
//
// A1 adds the upper-byte sums, AS5 = AS1 + AS2 (16 bits). A2 adds the
// lower-byte sums AS3 + AS4. When the two coefficient bytes are equal (C7),
// the lower-byte sum is the upper one shifted right by 8, so mux M1 gives
//   AS6 = C7 ? AS5>>8 : AS3 + AS4   (8 bits).
// Purely combinational. Follows the original architecture as drawn.
module add_l3 (
  input  logic [15:0] as1,
  input  logic [11:0] as2,
  input  logic [7:0]  as3,
  input  logic [3:0]  as4,
  input  logic        c7,
  output logic [15:0] as5,
  output logic [7:0]  as6
);
  logic [7:0] a2;

  always_comb begin
    as5 = as1 + 16'(as2);
    a2  = as3 + 8'(as4);
    as6 = c7 ? as5[15:8] : a2;
  end
endmodule
