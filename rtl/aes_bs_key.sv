// aes_bs_key: key array of the bit-serial AES with the on-the-fly AES-128 key
// schedule.
//
// Four srl32 rows hold the round key, row r holding key bytes (r, c), column 0
// at the head, MSB first. Each row has its own operation (k_op_e), applied in
// front of its input (the "L" logic of the array):
//   K_CHAIN_IN   rows form a 128-bit chain, row 3 takes the external key bit;
//   K_CHAIN_ROT  the same chain closed through row 0 (the round key streams
//                past head0 and returns unchanged after 128 cycles);
//   K_ROT        the row rotates on itself;
//   K_SBOX       the row rotates and xors the S-box output into the bit (and,
//                on row 0, the Rcon bit): w0 ^= SubWord(RotWord(w3)) ^ Rcon;
//   K_ADD        the row rotates and xors in the bit eight positions behind
//                the head (read port at position 7), which is the freshly
//                updated byte of the previous column: w[c] ^= w[c-1].
// head0 streams the round key to the AddRoundKey xor; head[r] can feed the
// S-box (sbox_src selects the row).
//
// The row structure, the read port at position 7, the S-box input taken from
// the array and the S-box output and Rcon entering through the row logic follow
// the reference design; the detailed sequence of row operations is the
// controller's own (see aes_bs_ctrl).
module aes_bs_key
  import aes_rs_pkg::*;
(
  input  logic           clk,
  input  k_op_e [3:0]    op,
  input  logic           din,
  input  logic           sbox_out,
  input  logic           rcon_bit,
  input  logic [1:0]     sbox_src,
  output logic           head0,
  output logic           sbox_in
);
  logic [3:0] head, tap7, d, ce;

  for (genvar r = 0; r < 4; r++) begin : g_row
    srl32 u_row (.clk(clk), .ce(ce[r]), .d(d[r]), .a(5'd7), .q(tap7[r]), .q31(head[r]));
  end

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      ce[r] = (op[r] != K_HOLD);
      unique case (op[r])
        K_CHAIN_IN:  d[r] = (r == 3) ? din     : head[(r+1)%4];
        K_CHAIN_ROT: d[r] = (r == 3) ? head[0] : head[(r+1)%4];
        K_SBOX:      d[r] = head[r] ^ sbox_out ^ ((r == 0) ? rcon_bit : 1'b0);
        K_ADD:       d[r] = head[r] ^ tap7[r];
        default:     d[r] = head[r];
      endcase
    end
  end

  assign head0   = head[0];
  assign sbox_in = head[sbox_src];
endmodule
