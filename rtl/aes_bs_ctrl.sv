// aes_bs_ctrl: controller of the bit-serial AES-128 (unmasked or masked).
//
// A small FSM with a cycle counter, a slot counter and a round counter
// sequences one encryption:
//   LOAD  128 cycles: plaintext and key stream into the state and key chains;
//         the previous ciphertext streams out at the same time.
//   SUB   AddRoundKey + SubBytes: 16 slots of 8 + CALC_CYCLES cycles. In the
//         first 8 cycles of a slot a state byte xor the round-key byte is
//         shifted into the S-box while the result of the previous slot is
//         shifted into the tail of the state chain; then the S-box computes
//         for CALC_CYCLES cycles. A 17th slot of 8 cycles pushes the last
//         result in (and the don't-care byte of slot 0 out).
//   SR    ShiftRows, 24 cycles: row r shifts during the first 8r cycles.
//   MC    MixColumns, 32 cycles (skipped in round 10).
//   KS    next round key, 120 cycles for CALC_CYCLES = 8: all rows rotate by
//         24 so column 3 is at the heads; four S-box evaluations on
//         k(1,3), k(2,3), k(3,3), k(0,3), each result xored into column 0 of
//         rows 0..3 while the next input is loaded, Rcon added into row 0;
//         row 0 is realigned during the computing cycles; finally 24 cycles
//         of w[c] ^= w[c-1] for columns 1..3.
// After round 10 done pulses and the ciphertext waits in the arrays (state
// xor last round key) until the next LOAD shifts it out.
//
// Cycle counts for CALC_CYCLES = 8 (unmasked S-box): LOAD 128, rounds 1..9
// 440 each, round 10 408, i.e. 4496 cycles from start to done. For the masked
// S-box (CALC_CYCLES = 18): 640 and 608 per round, 6496 in total.
// The phases, the shared S-box and the per-row shift enables follow the
// reference design; the ordering of the key-schedule operations and hence the
// exact cycle counts are this design's own (the reference reports 476/440 per
// round, 4852 in total).
module aes_bs_ctrl
  import aes_rs_pkg::*;
#(
  parameter int CALC_CYCLES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  output ctrl_t  ctl,
  output logic   loading,   // LOAD phase: din is consumed, ciphertext leaves
  output logic   ct_valid,  // the bit leaving during LOAD is ciphertext
  output logic   busy,
  output logic   done       // one-cycle pulse at the end of round 10
);
  localparam int SLOT = 8 + CALC_CYCLES;

  typedef enum logic [2:0] {P_IDLE, P_LOAD, P_SUB, P_SR, P_MC, P_KS} phase_e;

  phase_e     phase;
  logic [7:0] cyc;
  logic [4:0] slot;
  logic       have_ct;
  logic       last_cyc;
  logic [7:0] rc;
  logic [3:0] round;

  assign rc = rcon(round);

  // last cycle of the current phase step
  always_comb begin
    last_cyc = 1'b0;
    unique case (phase)
      P_LOAD: last_cyc = (cyc == 8'd127);
      P_SUB:  last_cyc = (slot == 5'd16) ? (cyc == 8'd7) : (cyc == 8'(SLOT-1));
      P_SR:   last_cyc = (cyc == 8'd23);
      P_MC:   last_cyc = (cyc == 8'd31);
      P_KS: unique case (slot)
              5'd0, 5'd6: last_cyc = (cyc == 8'd23);
              5'd5:       last_cyc = (cyc == 8'd7);
              default:    last_cyc = (cyc == 8'(SLOT-1));
            endcase
      default: last_cyc = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= P_IDLE;
      cyc     <= '0;
      slot    <= '0;
      round   <= 4'd1;
      have_ct <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (phase == P_IDLE) begin
        if (start) begin
          phase <= P_LOAD;
          cyc   <= '0;
        end
      end else if (!last_cyc) begin
        cyc <= cyc + 8'd1;
      end else begin
        cyc <= '0;
        unique case (phase)
          P_LOAD: begin
            phase   <= P_SUB;
            slot    <= '0;
            round   <= 4'd1;
            have_ct <= 1'b0;
          end
          P_SUB: if (slot == 5'd16) phase <= P_SR;
                 else               slot  <= slot + 5'd1;
          P_SR: begin
            phase <= (round == 4'd10) ? P_KS : P_MC;
            slot  <= '0;
          end
          P_MC: begin
            phase <= P_KS;
            slot  <= '0;
          end
          P_KS: if (slot != 5'd6) slot <= slot + 5'd1;
                else if (round == 4'd10) begin
                  phase   <= P_IDLE;
                  have_ct <= 1'b1;
                  done    <= 1'b1;
                end else begin
                  phase <= P_SUB;
                  slot  <= '0;
                  round <= round + 4'd1;
                end
          default: phase <= P_IDLE;
        endcase
      end
    end
  end

  assign loading  = (phase == P_LOAD);
  assign ct_valid = loading && have_ct;
  assign busy     = (phase != P_IDLE);

  // ----------------------------------------------------------- control word
  logic ld;       // S-box loading part of a slot / key step
  assign ld = (cyc < 8'd8);

  always_comb begin
    ctl               = '0;
    ctl.st_sel        = ST_ROT;
    ctl.k_op          = {4{K_HOLD}};
    ctl.sbox_op       = SB_IDLE;
    ctl.bit_idx       = 3'd7 - cyc[2:0];
    ctl.mc_first      = (cyc[2:0] == 3'd0);
    unique case (phase)
      P_LOAD: begin
        ctl.st_en  = 4'b1111;
        ctl.st_sel = ST_CHAIN_IN;
        ctl.k_op   = {4{K_CHAIN_IN}};
      end
      P_SUB: begin
        if (ld) begin
          ctl.st_en   = 4'b1111;
          ctl.st_sel  = ST_CHAIN_SBOX;
          if (slot != 5'd16) begin
            ctl.k_op    = {4{K_CHAIN_ROT}};
            ctl.sbox_op = (cyc == 8'd7) ? SB_LOAD_LAST : SB_LOAD;
          end else begin
            ctl.sbox_op = SB_LOAD;          // drain the last result
          end
        end else begin
          ctl.sbox_op = SB_CALC;
        end
      end
      P_SR: begin
        ctl.st_sel = ST_ROT;
        for (int r = 1; r < 4; r++) ctl.st_en[r] = (cyc < 8'(8*r));
      end
      P_MC: begin
        ctl.st_en  = 4'b1111;
        ctl.st_sel = ST_MC;
      end
      P_KS: begin
        ctl.sbox_from_key = 1'b1;
        unique case (slot)
          5'd0: ctl.k_op = {4{K_ROT}};
          5'd6: ctl.k_op = {4{K_ADD}};
          5'd5: begin                       // last result into row 3
            ctl.k_op[3] = K_SBOX;
            ctl.sbox_op = SB_LOAD;
          end
          default: begin                    // slots 1..4
            if (ld) begin
              // feed k((slot) mod 4, 3) into the S-box
              ctl.sbox_key_row         = slot[1:0];
              ctl.k_op[slot[1:0]]      = K_ROT;
              ctl.sbox_op              = (cyc == 8'd7) ? SB_LOAD_LAST : SB_LOAD;
              // previous result into column 0 of row slot-2
              if (slot != 5'd1) ctl.k_op[2'(slot - 5'd2)] = K_SBOX;
              ctl.rcon_bit             = (slot == 5'd2) ? rc[3'd7 - cyc[2:0]] : 1'b0;
            end else begin
              ctl.sbox_op = SB_CALC;
              if (cyc < 8'd16) ctl.k_op[0] = K_ROT;   // realign row 0
            end
          end
        endcase
      end
      default: ;
    endcase
  end
endmodule
