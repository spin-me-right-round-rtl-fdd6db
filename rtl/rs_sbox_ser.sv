// rs_sbox_ser: AES S-box with bit-serial loading and unloading, built from one
// 8-to-1 Boolean function S* (normal basis beta = 133).
//
// The S-box is driven by a command op each cycle (see sbox_op_e):
//   SB_LOAD       shift input bit x_i into R1 and the next result bit out of
//                 R2 (y_i is the bit leaving R2 in that cycle, MSB first);
//   SB_LOAD_LAST  the 8th input bit: p2n is applied to the seven bits in R1
//                 and x_i, and the result is written back into R1;
//   SB_CALC       one evaluation step: S*(R1) is computed and R1 rotates. The
//                 first seven results are shifted into R2; in the 8th step
//                 n2p (with the AES affine map) is applied to R2 and the last
//                 S* output and written back into R2.
// Input bits arrive MSB first. One S-box evaluation therefore takes 16
// cycles (8 loading, 8 computing), and the result is shifted out during the
// eight loading cycles of the next evaluation. A drain of the last result is
// eight SB_LOAD cycles with a don't-care input.
//
// R1 and R2 are 8-bit registers whose parallel write paths carry p2n and
// n2p, as in the reference design. A 3-bit counter of the computing steps
// sits inside the S-box here (this design's choice), so the controller only
// has to issue eight SB_CALC commands.
module rs_sbox_ser
  import aes_rs_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  sbox_op_e op,
  input  logic     x_i,
  output logic     y_i
);
  localparam logic [255:0] SSTAR_TT = anf_to_tt(SSTAR_ANF_133);

  logic [7:0] r1, r2;
  logic [2:0] step;
  logic       s_bit;

  assign s_bit = SSTAR_TT[r1];
  assign y_i   = r2[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1   <= '0;
      r2   <= '0;
      step <= '0;
    end else begin
      unique case (op)
        SB_LOAD: begin
          r1   <= {r1[6:0], x_i};
          r2   <= {r2[6:0], 1'b0};
          step <= '0;
        end
        SB_LOAD_LAST: begin
          r1   <= lin8(P2N_133, {r1[6:0], x_i});
          r2   <= {r2[6:0], 1'b0};
          step <= '0;
        end
        SB_CALC: begin
          r1   <= rotl8(r1);
          step <= step + 3'd1;
          if (step == 3'd7) r2 <= lin8(N2P_133, {r2[6:0], s_bit}) ^ AES_AFFINE_C;
          else              r2 <= {r2[6:0], s_bit};
        end
        default: ;
      endcase
    end
  end
endmodule
