// csk_adder: carry-skip adder, s = a + b + cin.
//
// The W bits are cut into blocks of BLK bits. Inside a block the carry
// ripples. Each block also forms its group propagate, the AND of a^b over its
// bits; when it is set the block's carry-out is its carry-in, which skips the
// block's ripple chain, otherwise it is the rippled carry. The worst-case
// path is one ripple through the first block, the skip muxes of the middle
// blocks and one ripple through the last block. Purely combinational. The
// block size is this design's choice.
module csk_adder #(
  parameter int unsigned W   = 19,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [W-1:0] p, g;

  always_comb begin
    logic c_blk, c_rip, bp;
    p     = a ^ b;
    g     = a & b;
    s     = '0;
    c_blk = cin;
    for (int j = 0; j < NB; j++) begin
      c_rip = c_blk;                       // ripple inside block j
      bp    = 1'b1;                        // group propagate of block j
      for (int i = j*BLK; i < (j+1)*BLK && i < W; i++) begin
        s[i]  = p[i] ^ c_rip;
        c_rip = g[i] | (p[i] & c_rip);
        bp    = bp & p[i];
      end
      c_blk = bp ? c_blk : c_rip;          // skip mux
    end
    cout = c_blk;
  end
endmodule
