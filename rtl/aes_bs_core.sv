// aes_bs_core: fully bit-serial AES-128 encryption with the rotational-symmetry
// S-box.
//
// State and key are each held in four 32-bit shift registers (one per row).
// Everything moves one bit per clock: the state xor the round key is streamed
// into one shared bit-serial S-box (rs_sbox_ser) whose result is streamed back
// into the state chain; ShiftRows is done by shifting rows different numbers
// of times; MixColumns works one bit of all four rows per cycle; the key
// schedule reuses the same S-box. aes_bs_ctrl sequences all of it.
//
// Interface: pulse start for one cycle while idle. During the following 128
// cycles (loading = 1) the core takes one plaintext bit on pt_i and one key
// bit on key_i per cycle. Bytes are sent in row-major order of the AES state,
// i.e. byte indices 0,4,8,12,1,5,9,13,2,6,10,14,3,7,11,15, each MSB first.
// After 4496 cycles done pulses. The ciphertext leaves on ct_o in the same byte
// and bit order during the 128 cycles of the next LOAD, flagged by ct_valid
// (the next block can be loaded at the same time; a dummy load retrieves the
// last one).
module aes_bs_core
  import aes_rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic pt_i,
  input  logic key_i,
  output logic loading,
  output logic ct_o,
  output logic ct_valid,
  output logic busy,
  output logic done
);
  ctrl_t      ctl;
  logic       st_head0, k_head0, k_sbox_in;
  logic       sbox_x, sbox_y;

  aes_bs_ctrl #(.CALC_CYCLES(8)) u_ctrl (
    .clk, .rst_n, .start, .ctl, .loading, .ct_valid, .busy, .done
  );

  aes_bs_state u_state (
    .clk, .en(ctl.st_en), .sel(ctl.st_sel), .mc_first(ctl.mc_first),
    .bit_idx(ctl.bit_idx), .din(pt_i), .sbox_out(sbox_y), .head0(st_head0)
  );

  aes_bs_key u_key (
    .clk, .op(ctl.k_op), .din(key_i), .sbox_out(sbox_y), .rcon_bit(ctl.rcon_bit),
    .sbox_src(ctl.sbox_key_row), .head0(k_head0), .sbox_in(k_sbox_in)
  );

  // AddRoundKey and the S-box input multiplexer
  assign sbox_x = ctl.sbox_from_key ? k_sbox_in : (st_head0 ^ k_head0);
  assign ct_o   = st_head0 ^ k_head0;

  rs_sbox_ser u_sbox (.clk, .rst_n, .op(ctl.sbox_op), .x_i(sbox_x), .y_i(sbox_y));
endmodule
