// aes_bs_state: state array of the bit-serial AES.
//
// Four srl32 rows hold the 16 state bytes, row r holding bytes (r, c) for
// columns c = 0..3; the byte of column 0 sits at the head (position 31) with
// its MSB first. Each row has its own shift enable. The input of each row is
// chosen by st_sel:
//   ST_CHAIN_IN / ST_CHAIN_SBOX  the rows form one 128-bit chain: row r takes
//       the serial output of row r+1, row 3 takes the external bit din
//       (loading) or the S-box output sbox_out (SubBytes). Bytes therefore
//       leave and enter the chain in row-major order: (0,0),(0,1),...,(3,3).
//   ST_ROT  every row rotates on itself; enabling row r for 8r cycles
//       performs ShiftRows.
//   ST_MC   every row takes its output bit of the bit-serial MixColumns.
// head0 is the bit leaving row 0, which the core xors with the round key to
// feed the S-box and to produce ciphertext. The read port of every row taps
// position 30, the bit behind the head, for MixColumns.
//
// Structure (one shift register per row, separate enables, next-to-last read
// port, MixColumns muxed into the rows) follows the reference design.
module aes_bs_state
  import aes_rs_pkg::*;
(
  input  logic       clk,
  input  logic [3:0] en,
  input  st_sel_e    sel,
  input  logic       mc_first,
  input  logic [2:0] bit_idx,
  input  logic       din,
  input  logic       sbox_out,
  output logic       head0
);
  logic [3:0] head, next, d, mc;

  for (genvar r = 0; r < 4; r++) begin : g_row
    srl32 u_row (.clk(clk), .ce(en[r]), .d(d[r]), .a(5'd30), .q(next[r]), .q31(head[r]));
  end

  aes_bs_mixcol u_mc (
    .clk(clk), .en(sel == ST_MC && en[0]), .mc_first(mc_first), .bit_idx(bit_idx),
    .head(head), .next(next), .mc(mc)
  );

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      unique case (sel)
        ST_CHAIN_IN:   d[r] = (r == 3) ? din      : head[(r+1)%4];
        ST_CHAIN_SBOX: d[r] = (r == 3) ? sbox_out : head[(r+1)%4];
        ST_ROT:        d[r] = head[r];
        ST_MC:         d[r] = mc[r];
        default:       d[r] = head[r];
      endcase
    end
  end

  assign head0 = head[0];
endmodule
