// aes_masked_core: first-order masked bit-serial AES-128 encryption with two
// shares.
//
// The datapath is that of aes_bs_core, duplicated per share for all linear
// parts: two state arrays and two key arrays (each four 32-bit shift-register
// rows), two bit-serial MixColumns, the round-key xor per share, and Rcon
// added to share 0 only. The only non-linear part, the S-box, is the masked
// bit-serial S-box (masked_sbox, 26 cycles per evaluation), shared between
// round function and key schedule. Its 18 fresh random bits per cycle come
// from 18 LFSRs (lfsr31) running on the falling clock edge.
//
// Interface: as aes_bs_core, but plaintext, key and ciphertext are carried as
// two Boolean shares (bit 0 = share 0, bit 1 = share 1): the value is the xor
// of the two bits. prng_en = 0 turns the fresh randomness off (all random
// bits 0), the setting used to emulate an unprotected run. One encryption
// keeps the core busy for 6496 cycles (128 loading, 640 per round, 608 in the
// last round); the reference design reports 6852.
module aes_masked_core
  import aes_rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       prng_en,
  input  logic [1:0] pt_i,
  input  logic [1:0] key_i,
  output logic       loading,
  output logic [1:0] ct_o,
  output logic       ct_valid,
  output logic       busy,
  output logic       done
);
  ctrl_t       ctl;
  logic [1:0]  st_head0, k_head0, k_sbox_in, sbox_x, sbox_y;
  logic [17:0] rnd;

  aes_bs_ctrl #(.CALC_CYCLES(18)) u_ctrl (
    .clk, .rst_n, .start, .ctl, .loading, .ct_valid, .busy, .done
  );

  for (genvar s = 0; s < 2; s++) begin : g_share
    aes_bs_state u_state (
      .clk, .en(ctl.st_en), .sel(ctl.st_sel), .mc_first(ctl.mc_first),
      .bit_idx(ctl.bit_idx), .din(pt_i[s]), .sbox_out(sbox_y[s]), .head0(st_head0[s])
    );
    aes_bs_key u_key (
      .clk, .op(ctl.k_op), .din(key_i[s]), .sbox_out(sbox_y[s]),
      .rcon_bit((s == 0) ? ctl.rcon_bit : 1'b0),
      .sbox_src(ctl.sbox_key_row), .head0(k_head0[s]), .sbox_in(k_sbox_in[s])
    );
  end

  assign sbox_x = ctl.sbox_from_key ? k_sbox_in : (st_head0 ^ k_head0);
  assign ct_o   = st_head0 ^ k_head0;

  for (genvar i = 0; i < 18; i++) begin : g_prng
    // distinct non-zero seeds
    lfsr31 #(.SEED(31'(32'h2545_f491 * (i + 1)) | 31'h1)) u_lfsr (
      .clk, .rst_n, .en(prng_en), .q(rnd[i])
    );
  end

  masked_sbox u_sbox (.clk, .rst_n, .op(ctl.sbox_op), .x_i(sbox_x), .r(rnd), .y_i(sbox_y));
endmodule
