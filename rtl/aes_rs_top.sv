// aes_rs_top: the three designs built on the rotational symmetry of the AES
// S-box, side by side with their own ports:
//   - u_aes:   fully bit-serial AES-128 (aes_bs_core), 4496 cycles per block;
//   - u_maes:  first-order masked bit-serial AES-128 (aes_masked_core), two
//              shares, 6496 cycles per block;
//   - u_bss:   byte-serial AES-128 with RAM-based state and key and the
//              byte-parallel-load rotational S-box (aes_byte_serial), 5538
//              cycles per block;
//   - u_sbox8: that S-box (rs_sbox_par, 8 cycles) on its own ports, for use
//              in other byte-oriented datapaths.
// All share one clock and one active-low asynchronous reset. Port meanings
// are those of the instantiated modules (prefixes aes_, maes_, bss_, sb_).
module aes_rs_top (
  input  logic       clk,
  input  logic       rst_n,
  // bit-serial AES-128
  input  logic       aes_start,
  input  logic       aes_pt_i,
  input  logic       aes_key_i,
  output logic       aes_loading,
  output logic       aes_ct_o,
  output logic       aes_ct_valid,
  output logic       aes_busy,
  output logic       aes_done,
  // masked bit-serial AES-128
  input  logic       maes_start,
  input  logic       maes_prng_en,
  input  logic [1:0] maes_pt_i,
  input  logic [1:0] maes_key_i,
  output logic       maes_loading,
  output logic [1:0] maes_ct_o,
  output logic       maes_ct_valid,
  output logic       maes_busy,
  output logic       maes_done,
  // byte-serial AES-128
  input  logic       bss_start,
  input  logic [7:0] bss_pt_i,
  input  logic [7:0] bss_key_i,
  output logic       bss_loading,
  output logic [7:0] bss_ct_o,
  output logic       bss_ct_valid,
  output logic       bss_busy,
  output logic       bss_done,
  // byte-parallel rotational S-box
  input  logic       sb_start,
  input  logic [7:0] sb_x,
  output logic [7:0] sb_y,
  output logic       sb_y_valid,
  output logic       sb_busy
);
  aes_bs_core u_aes (
    .clk, .rst_n, .start(aes_start), .pt_i(aes_pt_i), .key_i(aes_key_i),
    .loading(aes_loading), .ct_o(aes_ct_o), .ct_valid(aes_ct_valid),
    .busy(aes_busy), .done(aes_done)
  );

  aes_masked_core u_maes (
    .clk, .rst_n, .start(maes_start), .prng_en(maes_prng_en), .pt_i(maes_pt_i),
    .key_i(maes_key_i), .loading(maes_loading), .ct_o(maes_ct_o),
    .ct_valid(maes_ct_valid), .busy(maes_busy), .done(maes_done)
  );

  aes_byte_serial u_bss (
    .clk, .rst_n, .start(bss_start), .pt_i(bss_pt_i), .key_i(bss_key_i),
    .loading(bss_loading), .ct_o(bss_ct_o), .ct_valid(bss_ct_valid),
    .busy(bss_busy), .done(bss_done)
  );

  rs_sbox_par u_sbox8 (
    .clk, .rst_n, .start(sb_start), .x(sb_x), .y(sb_y), .y_valid(sb_y_valid), .busy(sb_busy)
  );
endmodule
