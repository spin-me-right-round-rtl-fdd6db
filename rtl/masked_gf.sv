// masked_gf: first-order masked realisation, with two shares, of the cubic
// Boolean functions G* (coordinate of x^26) and F* (coordinate of x^49) in
// the normal basis beta = 205.
//
// G* and F*^G* are each split into three parts (A, B, C). A part is a set of
// monomials together with a "world", an assignment of each of the 8 input
// variables to one of three domains such that no monomial of the part holds
// two variables of the same domain. Each part depends on 7 variables only.
// Every part is expanded into 8 output shares z_k, k = (sa, sb, sc): each
// monomial takes share sa of its domain-0 variable, sb of its domain-1
// variable and sc of its domain-2 variable; a monomial that lacks a domain
// contributes only to shares with that domain's index 0. So every z_k sees one
// share of each variable (non-completeness). The cross-domain shares are
// refreshed with three fresh bits per part,
//   z0, z1^r0, z2^r1, z3^r2  ->  output share 0
//   z4^r2, z5^r1, z6^r0, z7  ->  output share 1,
// and all 6 x 8 = 48 terms are registered to stop glitches. After the register
// an xor tree compresses them to two shares; sel = 0 outputs G*, sel = 1 adds
// the F*^G* terms and so outputs F*. Latency: one clock cycle; sel applies to
// the cycle in which the result is read. Randomness: 18 bits per cycle.
//
// Part split, refresh pattern, register stage, compression and sel follow the
// reference design; the concrete splits (aes_rs_pkg) were found with its
// heuristic and are this design's own.
module masked_gf
  import aes_rs_pkg::*;
(
  input  logic        clk,
  input  logic [7:0]  x0,      // share 0 of the 8 input variables
  input  logic [7:0]  x1,      // share 1
  input  logic [17:0] r,       // fresh randomness, 3 bits per part
  input  logic        sel,     // 0: G*, 1: F*
  output logic [1:0]  y        // two output shares
);
  // Truth table of output share k of a part, over the 8 selected input bits
  // (one share of each variable): the part's monomials that may appear in
  // share k, i.e. whose absent domains have share index 0 in k.
  function automatic logic [255:0] share_tt(input world_t w, input anf_t anf,
                                            input logic [2:0] k);
    logic [255:0] a;
    logic [2:0]   present, idx;
    a   = '0;
    idx = {k[0], k[1], k[2]};        // share index of domain 0, 1, 2
    for (int m = 0; m < 256; m++) begin
      present = '0;
      for (int v = 0; v < 8; v++)
        if (m[v]) present[w[2*v +: 2]] = 1'b1;
      if (anf[m] && ((~present & idx) == 3'b000)) a[m] = 1'b1;
    end
    return anf_to_tt(a);
  endfunction

  // Input bits seen by share k: share k[2-d] of each variable of domain d.
  function automatic logic [7:0] pick(input world_t w, input logic [2:0] k,
                                      input logic [7:0] s0, input logic [7:0] s1);
    logic [7:0] u;
    for (int v = 0; v < 8; v++)
      u[v] = k[2 - int'(w[2*v +: 2])] ? s1[v] : s0[v];
    return u;
  endfunction

  logic [7:0] terms_d [NPARTS];
  logic [7:0] terms_q [NPARTS];

  for (genvar p = 0; p < NPARTS; p++) begin : g_part
    logic [7:0] z;
    for (genvar k = 0; k < 8; k++) begin : g_share
      localparam logic [255:0] TT = share_tt(PART_WORLD[p], PART_ANF[p], 3'(k));
      assign z[k] = TT[pick(PART_WORLD[p], 3'(k), x0, x1)];
    end
    // refresh of the cross-domain shares
    assign terms_d[p][0] = z[0];
    assign terms_d[p][1] = z[1] ^ r[3*p + 0];
    assign terms_d[p][2] = z[2] ^ r[3*p + 1];
    assign terms_d[p][3] = z[3] ^ r[3*p + 2];
    assign terms_d[p][4] = z[4] ^ r[3*p + 2];
    assign terms_d[p][5] = z[5] ^ r[3*p + 1];
    assign terms_d[p][6] = z[6] ^ r[3*p + 0];
    assign terms_d[p][7] = z[7];
  end

  always_ff @(posedge clk)
    for (int p = 0; p < NPARTS; p++) terms_q[p] <= terms_d[p];

  // compression: per function one xor of 12 terms per output share
  logic [1:0] g_c, fg_c;
  always_comb begin
    g_c  = '0;
    fg_c = '0;
    for (int p = 0; p < 3; p++) begin
      g_c[0]  ^= ^terms_q[p][3:0];
      g_c[1]  ^= ^terms_q[p][7:4];
      fg_c[0] ^= ^terms_q[p+3][3:0];
      fg_c[1] ^= ^terms_q[p+3][7:4];
    end
  end

  assign y = g_c ^ (sel ? fg_c : 2'b00);
endmodule
