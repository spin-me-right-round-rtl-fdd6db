// aes_rs_pkg: constants, types and functions shared by the rotational-symmetry
// AES S-boxes and the bit-serial AES datapaths.
//
// The AES S-box is inv(x) in GF(2^8) (polynomial 0x11B) followed by the AES
// affine map. Written in a normal basis (beta, beta^2, ..., beta^128), the
// inversion is rotation-symmetric: output coordinate k equals one fixed
// 8-to-1 Boolean function S* applied to the input rotated left by 7-k
// positions. A serial datapath therefore rotates its input register once per
// clock and obtains the output bits MSB first (coordinate 7, 6, ..., 0).
//
// Linear maps are stored as eight 8-bit row masks: output bit i is the parity
// of (ROW[i] & x). "p2n" maps the polynomial basis (alpha = 2) to the normal
// basis; "n2p" maps back and folds in the AES affine matrix, its constant 0x63
// being added separately.
//
// Three normal bases are used, as in the reference design:
//   beta = 145 : S-box with byte-parallel loading   (8 cycles)
//   beta = 133 : S-box with bit-serial loading      (16 cycles)
//   beta = 205 : masked S-box, x^254 = (x^26)^49    (26 cycles)
// The p2n maps and the ANFs of S* are the published ones; the n2p maps are
// derived from the basis (column i of the normal-to-polynomial matrix is
// beta^(2^i)) and agree with the published ones where those are given.
// The 3-splits of G* and F*^G* below were produced with the world-splitting
// heuristic of the masking scheme (each part depends on seven variables);
// they are this design's own, not copied tables.
package aes_rs_pkg;

  typedef logic [7:0] byte_rows_t [8];

  // ---------------------------------------------------------------- beta=145
  localparam byte_rows_t P2N_145 = '{8'h4b, 8'hc7, 8'h1f, 8'h57, 8'h37, 8'h17, 8'h1d, 8'h59};
  localparam byte_rows_t N2P_145 = '{8'h5b, 8'hda, 8'h02, 8'h0e, 8'h04, 8'h7d, 8'h11, 8'h36};
  localparam logic [255:0] SSTAR_ANF_145 =
    256'h1c14813636f5767d6abc937b490334efd066cb1449f7ad147f30286c8bbef414;

  // ---------------------------------------------------------------- beta=133
  localparam byte_rows_t P2N_133 = '{8'h09, 8'he3, 8'h2d, 8'hd1, 8'hab, 8'h4d, 8'hf1, 8'ha1};
  localparam byte_rows_t N2P_133 = '{8'h40, 8'h02, 8'h07, 8'h15, 8'h0e, 8'h39, 8'hbb, 8'h41};
  localparam logic [255:0] SSTAR_ANF_133 =
    256'h70355d75860553518544703c10a90ad5ef30c359047bf6e4cccce9c4635703a8;

  // ---------------------------------------------------------------- beta=205
  localparam byte_rows_t P2N_205 = '{8'h99, 8'hcb, 8'h6d, 8'hfb, 8'he5, 8'h1b, 8'h6f, 8'hf5};
  localparam byte_rows_t N2P_205 = '{8'h3d, 8'he9, 8'hce, 8'h68, 8'h9d, 8'h82, 8'h11, 8'hc9};

  // Parts of the cubic functions G* (x^26) and F*^G* (x^49 ^ x^26). A world
  // assigns each of the 8 variables a domain 0..2 (2 bits per variable, var v
  // at [2v+1:2v]); the ANF vector holds bit m set when monomial m belongs to
  // the part.
  localparam int NPARTS = 6;
  typedef logic [15:0]  world_t;
  typedef logic [255:0] anf_t;
  localparam world_t PART_WORLD [NPARTS] = '{
    16'ha904, 16'h14a4, 16'h0a64,          // G^A, G^B, G^C
    16'h6810, 16'h0264, 16'h50a4           // (F^G)^A, (F^G)^B, (F^G)^C
  };
  localparam anf_t PART_ANF [NPARTS] = '{
    256'h0000000000000000000000000003050c00000000010104020102000901000508,
    256'h00000000000000100000010100000040000000000000023000000000000008a0,
    256'h0000000000000000000000000000000000000104000400400000000002042000,
    256'h0000000000000104000000050001000100000000001101500010114000101100,
    256'h00000000000000000000000001000040000000000104000000000000030c2000,
    256'h0000000000000000000000000000022200000000000000200000000004000000
  };

  localparam logic [7:0] AES_AFFINE_C = 8'h63;

  // Bit-serial MixColumns reduction polynomial x^8 = x^4+x^3+x+1.
  localparam logic [7:0] MC_POLY = 8'h1b;

  // Linear 8x8 map given as row masks.
  function automatic logic [7:0] lin8(input byte_rows_t rows, input logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[i] = ^(rows[i] & x);
    return y;
  endfunction

  // Truth table of a Boolean function from its ANF (binary Moebius transform).
  function automatic logic [255:0] anf_to_tt(input logic [255:0] anf);
    logic [255:0] a;
    a = anf;
    for (int i = 0; i < 8; i++)
      for (int m = 0; m < 256; m++)
        if (m[i]) a[m] = a[m] ^ a[m ^ (1 << i)];
    return a;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v);
    return {v[6:0], v[7]};
  endfunction

  // Round constant of round r (1..10).
  function automatic logic [7:0] rcon(input logic [3:0] r);
    logic [7:0] c;
    c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(r)) c = {c[6:0], 1'b0} ^ (c[7] ? MC_POLY : 8'h00);
    return c;
  endfunction

  // Plain AES S-box as a 256 x 8 table (entry x at [8x +: 8]), for the
  // byte-serial datapath with a one-cycle S-box. Walks the multiplicative
  // group with generator 3: p = 3^k and q = 3^-k, so q = inv(p); each entry is
  // the affine map of q: q ^ rotl(q,1) ^ rotl(q,2) ^ rotl(q,3) ^ rotl(q,4) ^ 0x63.
  function automatic logic [2047:0] aes_sbox_table();
    logic [2047:0] t;
    logic [7:0]    p, q, a;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int k = 0; k < 255; k++) begin
      p = p ^ {p[6:0], 1'b0} ^ (p[7] ? MC_POLY : 8'h00);
      q = q ^ {q[6:0], 1'b0};
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'h0};
      if (q[7]) q = q ^ 8'h09;
      a = q;
      for (int n = 0; n < 4; n++) begin
        a = rotl8(a);
        if (n == 0) t[8*p +: 8] = q ^ a;
        else        t[8*p +: 8] = t[8*p +: 8] ^ a;
      end
      t[8*p +: 8] = t[8*p +: 8] ^ AES_AFFINE_C;
    end
    t[7:0] = AES_AFFINE_C;
    return t;
  endfunction

  // Commands to a serial S-box. LOAD shifts one input bit into R1 and one
  // result bit out of R2; LOAD_LAST does the same for the 8th input bit and
  // applies p2n; CALC advances the evaluation by one cycle (the S-box counts
  // its own evaluation cycles).
  typedef enum logic [1:0] {SB_IDLE, SB_LOAD, SB_LOAD_LAST, SB_CALC} sbox_op_e;

  // Input selection of the state rows.
  typedef enum logic [1:0] {
    ST_CHAIN_IN,   // row r takes row r+1's serial output, row 3 takes the external bit
    ST_CHAIN_SBOX, // as ST_CHAIN_IN, row 3 takes the S-box output
    ST_ROT,        // each row feeds back its own serial output (ShiftRows)
    ST_MC          // each row takes its MixColumns output bit
  } st_sel_e;

  // Per-row operation of the key rows.
  typedef enum logic [2:0] {
    K_HOLD,        // no shift
    K_CHAIN_IN,    // chain, row 3 takes the external key bit (loading)
    K_CHAIN_ROT,   // chain, row 3 takes row 0's output (128-bit rotation)
    K_ROT,         // rotate the row on itself
    K_SBOX,        // rotate, xoring in the S-box output (and Rcon on row 0)
    K_ADD          // rotate, xoring in the bit 8 places behind (w[c] ^= w[c-1])
  } k_op_e;

  typedef struct packed {
    logic [3:0]     st_en;        // state row shift enables
    st_sel_e        st_sel;
    logic           mc_first;     // first bit (MSB) of a MixColumns byte
    logic [2:0]     bit_idx;      // index of the bit being processed (7 = MSB)
    k_op_e [3:0]    k_op;         // per key row
    logic           rcon_bit;     // Rcon bit xored into key row 0 in K_SBOX
    sbox_op_e       sbox_op;
    logic           sbox_from_key;// S-box input from a key row instead of state^key
    logic [1:0]     sbox_key_row; // which key row feeds the S-box
  } ctrl_t;

endpackage
