// aes_bs_mixcol: bit-serial MixColumns for one column of the AES state.
//
// The four bytes a0..a3 of a column arrive one bit per row and cycle, MSB
// first, at the heads of the four state rows (head[r]); next[r] is the bit
// right behind the head, i.e. bit j-1 of the same byte while bit j is at the
// head. For output bit j of row r the block computes
//   b_r[j] = 2*a_r[j] ^ 3*a_{r+1}[j] ^ a_{r+2}[j] ^ a_{r+3}[j]
//   (2*a)[j] = a[j-1]&notLSB ^ a[7]&Poly[j],   3*a = 2*a ^ a
// where notLSB is low for j = 0 and Poly is the reduction constant 0x1B. The
// MSB a[7] of each byte is needed in all eight cycles: it is taken from the
// head in the first cycle (mc_first) and kept in one of four flip-flops for the
// remaining seven. Eight cycles per column, 32 for the whole state.
//
// Processing order, the notLSB/Poly signals and the four MSB flip-flops follow
// the reference design; the exact gating is this design's formulation.
module aes_bs_mixcol
  import aes_rs_pkg::*;
(
  input  logic       clk,
  input  logic       en,        // a MixColumns bit is being processed
  input  logic       mc_first,  // the bit at the heads is bit 7
  input  logic [2:0] bit_idx,   // index j of the bit at the heads
  input  logic [3:0] head,
  input  logic [3:0] next,
  output logic [3:0] mc
);
  logic [3:0] msb_q, msb;
  logic [3:0] dbl;            // bit j of 2*a_r
  logic       not_lsb, poly;

  assign not_lsb = (bit_idx != 3'd0);
  assign poly    = MC_POLY[bit_idx];
  assign msb     = mc_first ? head : msb_q;

  always_ff @(posedge clk)
    if (en && mc_first) msb_q <= head;

  always_comb begin
    for (int r = 0; r < 4; r++) dbl[r] = (next[r] & not_lsb) ^ (msb[r] & poly);
    for (int r = 0; r < 4; r++)
      mc[r] = dbl[r] ^ dbl[(r+1)%4] ^ head[(r+1)%4] ^ head[(r+2)%4] ^ head[(r+3)%4];
  end
endmodule
