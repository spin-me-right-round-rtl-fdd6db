// rs_sbox_par: AES S-box with byte-parallel loading, built from one 8-to-1
// Boolean function S* evaluated eight times on a rotating register.
//
// On the clock edge where start is high, the input byte x is converted to the
// normal basis with beta = 145 (p2n) and written into the 8-bit register R1.
// In each of the next eight cycles R1 rotates by one position and S*(R1) gives
// one output coordinate, MSB first. The first seven are shifted into the
// 7-bit register R2. In the eighth cycle the last S* output bypasses R2 and,
// together with R2, goes through n2p, which also applies the AES affine map;
// y is valid (combinationally) in that cycle, flagged by y_valid. So the
// latency is 8 cycles from the start edge, and a new start may be given in
// the cycle in which y_valid is high.
//
// The basis, the 8-cycle schedule, the 7-bit R2 and the bypass follow the
// reference design; the start/y_valid handshake, the reset and the counter
// are this design's own.
module rs_sbox_par
  import aes_rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] x,
  output logic [7:0] y,
  output logic       y_valid,
  output logic       busy
);
  localparam logic [255:0] SSTAR_TT = anf_to_tt(SSTAR_ANF_145);

  logic [7:0] r1;
  logic [6:0] r2;
  logic [2:0] cnt;
  logic       s_bit;

  assign s_bit   = SSTAR_TT[r1];
  assign y       = lin8(N2P_145, {r2, s_bit}) ^ AES_AFFINE_C;
  assign y_valid = busy && (cnt == 3'd7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1   <= '0;
      r2   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
    end else if (start && (!busy || y_valid)) begin
      r1   <= lin8(P2N_145, x);
      cnt  <= '0;
      busy <= 1'b1;
    end else if (busy) begin
      r1  <= rotl8(r1);
      r2  <= {r2[5:0], s_bit};
      cnt <= cnt + 3'd1;
      if (cnt == 3'd7) busy <= 1'b0;
    end
  end
endmodule
