// vhbcse_mult: unsigned VHBCSE (vertical-horizontal binary common
// subexpression elimination) multiplier of one input sample by one
// coefficient magnitude.
//
// Layer 1: the partial product generator forms Xin + Xin/2 and its shifts,
// and eight 4:1 muxes pick one partial product per 2-bit coefficient group.
// Layer 2: four adders plus six muxes steered by the nibble-equality signals
// C1..C6 of the control logic generator. Layer 3: two adders plus one mux
// steered by the byte-equality signal C7. Layer 4: the final adder, whose sum
// is shifted right by one:
//   cf = (AS5 + AS6) >> 1  ~=  floor(Xin * Hm / 2^16)
// Every partial product is truncated, so cf is never above the exact value
// and at most 4 below it. Xin must not exceed 2^15 (the magnitude of a 16-bit
// two's complement sample). Purely combinational. Layers 1 to 3 follow the
// original architecture; reading the final '>>1' as a shift of the layer-4
// sum (Hm a pure fraction) is this design's interpretation.
module vhbcse_mult (
  input  logic [15:0] xin,   // unsigned input magnitude, <= 2^15
  input  logic [15:0] hm,    // coefficient magnitude, 16 fraction bits
  output logic [15:0] cf     // product magnitude
);
  logic [16:0] p  [1:8];
  logic [16:0] pp [0:7];
  logic [7:1]  c;
  logic [15:0] as1, as5;
  logic [11:0] as2;
  logic [7:0]  as3, as6;
  logic [3:0]  as4;
  logic [16:0] sum4;

  ppg    u_ppg (.xin, .p);
  mux_l1 u_mux (.xin, .p, .hm, .pp);
  cl_gen u_cl  (.hm, .c);
  add_l2 u_l2  (.pp, .c(c[6:1]), .as1, .as2, .as3, .as4);
  add_l3 u_l3  (.as1, .as2, .as3, .as4, .c7(c[7]), .as5, .as6);

  always_comb begin
    sum4 = {1'b0, as5} + {9'b0, as6};   // layer 4
    cf   = 16'(sum4 >> 1);
  end
endmodule
