// masked_sbox: first-order masked (two shares) bit-serial AES S-box using the
// decomposition x^254 = (x^26)^49 in the normal basis beta = 205.
//
// Both shares travel side by side through 8-bit registers R1 and R2. Driven
// by the same commands as rs_sbox_ser (see sbox_op_e), one evaluation takes
// 26 cycles:
//   cycles 1..8    SB_LOAD/SB_LOAD_LAST: the shares of x enter R1 MSB first;
//                  in cycle 8 p2n is applied to each share;
//   cycles 9..16   (CALC steps 0..7) R1 rotates and feeds G* (masked_gf);
//   cycles 10..17  (steps 1..8) the registered G* shares enter R2; in cycle 17
//                  R2's seven bits and the last G* bit are written into R1;
//   cycles 18..25  (steps 9..16) R1 rotates again, now feeding F*;
//   cycles 19..26  (steps 10..17) the F* shares enter R2; in cycle 26 n2p
//                  (with the AES affine map, constant on share 0) is applied.
// The result leaves R2 on y_i, one bit per share and cycle, MSB first, while
// the next input is loaded. The controller issues 18 SB_CALC commands; the
// S-box counts them itself. r must supply 18 fresh bits every cycle.
//
// Pre-charge register: the G*/F* inputs come from a register that is cleared
// while the clock is high and takes R1 on the falling edge, so a rotation of
// R1 at the rising edge never reaches G*/F* directly and the inputs pass
// through all-zero between two values. Both the schedule and this register
// follow the reference design. The command interface and the internal step
// counter are this design's own.
module masked_sbox
  import aes_rs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sbox_op_e    op,
  input  logic [1:0]  x_i,
  input  logic [17:0] r,
  output logic [1:0]  y_i
);
  logic [7:0] r1 [2];
  logic [7:0] r2 [2];
  logic [7:0] pre [2];
  logic [4:0] step;
  logic [1:0] gf;
  logic       sel_f;

  // pre-charge register: cleared while clk is high, loaded on the falling edge
  logic precharge;
  assign precharge = clk;

  always_ff @(negedge clk or posedge precharge) begin
    if (precharge) begin
      pre[0] <= '0;
      pre[1] <= '0;
    end else begin
      pre[0] <= r1[0];
      pre[1] <= r1[1];
    end
  end

  // results read in steps 1..8 are G*, in steps 10..17 F*
  assign sel_f = (step >= 5'd9);

  masked_gf u_gf (.clk, .x0(pre[0]), .x1(pre[1]), .r, .sel(sel_f), .y(gf));

  assign y_i = {r2[1][7], r2[0][7]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1[0] <= '0; r1[1] <= '0;
      r2[0] <= '0; r2[1] <= '0;
      step  <= '0;
    end else begin
      unique case (op)
        SB_LOAD, SB_LOAD_LAST: begin
          for (int s = 0; s < 2; s++) begin
            r1[s] <= (op == SB_LOAD_LAST) ? lin8(P2N_205, {r1[s][6:0], x_i[s]})
                                          : {r1[s][6:0], x_i[s]};
            r2[s] <= {r2[s][6:0], 1'b0};
          end
          step <= '0;
        end
        SB_CALC: begin
          step <= step + 5'd1;
          for (int s = 0; s < 2; s++) begin
            // R1: rotate while feeding G* (steps 0..7) and F* (9..16)
            if (step == 5'd8)                        r1[s] <= {r2[s][6:0], gf[s]};
            else if (step != 5'd17)                  r1[s] <= rotl8(r1[s]);
            // R2: collect results
            if (step == 5'd17)
              r2[s] <= lin8(N2P_205, {r2[s][6:0], gf[s]}) ^ ((s == 0) ? AES_AFFINE_C : 8'h00);
            else if (step != 5'd0 && step != 5'd9)   r2[s] <= {r2[s][6:0], gf[s]};
          end
        end
        default: ;
      endcase
    end
  end
endmodule
