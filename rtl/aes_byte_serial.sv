// aes_byte_serial: byte-serial AES-128 encryption around the rotational S-box
// with byte-parallel loading (rs_sbox_par, 8 cycles per evaluation).
//
// Datapath: a 256-bit state RAM and a 256-bit key RAM (32 x 8 bits each, one
// asynchronous read port and one write port). Each RAM is split into two
// 16-byte halves used in alternation: a round reads the old state and key
// from half h and writes the new ones into half ~h, so no byte is
// overwritten while still needed. A 2:1 multiplexer feeds the S-box from
// either RAM. The S-box result, multiplied by the MixColumns coefficient, is
// accumulated in an 8-bit aggregation register; the round-key byte is added
// when the byte is written back.
//
// MixColumns is computed on the fly, byte by byte. New state byte (r, c) is
//   s'(r,c) = 2.S(s(r,c+r)) ^ 3.S(s(r+1,c+r+1)) ^ S(s(r+2,..)) ^ S(s(r+3,..)) ^ k'(r,c)
// with ShiftRows folded into the read addresses (column indices mod 4). Every
// S-box result is used once and then discarded, so a round makes 64
// evaluations for the state (16 in the last round, which has no MixColumns).
// The key schedule is interleaved with the round: key byte k'(r,c) is formed
// right before state byte s'(r,c) needs it.
//
// Schedule (cycles):
//   LOAD      32   key bytes 0..15 on key_i, then plaintext bytes 0..15 on
//                  pt_i (written as plaintext ^ key: first AddRoundKey)
//   per byte (r, c), c outer, r inner:
//     key, c = 0   9   one S-box call on k(r+1 mod 4, 3), then k(r,0) ^ Rcon
//     key, c > 0   2   read k'(r,c-1), then write k(r,c) ^ k'(r,c-1)
//     state       33   four S-box calls back to back (9 in the last round:
//                      one call), the write-back adds k'(r,c)
//   round end  1   swap the halves
// One round takes 4*9 + 12*2 + 16*33 + 1 = 589 cycles, the last round
// 4*9 + 12*2 + 16*9 + 1 = 205, an encryption 32 + 9*589 + 205 = 5538.
//
// Parameter ROT_SBOX = 0 replaces the rotational S-box by a one-cycle 8x8
// table S-box (the latency-optimised starting point of this design). The
// schedule is the same with the S-box latency removed: key bytes take 2
// cycles (S-box read, then write), a state byte 5 (four reads into the
// aggregation register, then the write) and 1 in the last round, so a round
// takes 16*2 + 16*5 + 1 = 113 cycles, the last 16*2 + 16*1 + 1 = 49 and an
// encryption 32 + 9*113 + 49 = 1098.
//
// Interface: pulse start while idle. In the following 32 cycles (loading
// high) present key bytes 0..15 on key_i and then plaintext bytes 0..15 on
// pt_i (FIPS-197 byte order, byte 0 = most significant byte of the block).
// The ciphertext leaves in the last round, byte 0 first, one byte per 9
// cycles, on ct_o with ct_valid; done pulses in the last busy cycle.
//
// The structure (two 256-bit RAMs in alternating halves, 2:1 multiplexer
// before the S-box, 8-bit aggregation register, S-box re-evaluated for every
// MixColumns term, interleaved key schedule, the 32/589/205 cycle budget)
// follows the reference design. The byte order, the order of the operations
// inside a round, the FSM and the handshake are this design's own. The
// write-back adds the last S-box result and the round key in one cycle.
module aes_byte_serial
  import aes_rs_pkg::*;
#(
  parameter bit ROT_SBOX = 1'b1   // 1: rotational S-box (8 cycles), 0: table S-box
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] pt_i,
  input  logic [7:0] key_i,
  output logic       loading,
  output logic [7:0] ct_o,
  output logic       ct_valid,
  output logic       busy,
  output logic       done
);
  typedef enum logic [2:0] {B_IDLE, B_LOAD, B_KEY0, B_KEYA, B_KEYB, B_ST, B_REND} phase_e;

  phase_e     phase;
  logic [4:0] cnt;        // load counter
  logic [1:0] r, c;       // byte being produced: row, column
  logic [1:0] i;          // index of the S-box call outstanding
  logic       wait_q;     // an S-box call is outstanding
  logic [3:0] round;
  logic       h;          // half holding the current state and key
  logic [7:0] acc;        // aggregation register

  logic [7:0] st_ram [32];
  logic [7:0] k_ram  [32];
  logic [4:0] st_ra, k_ra, st_wa, k_wa;
  logic [7:0] st_q, k_q, st_wd, k_wd;
  logic       st_we, k_we;

  logic       sb_start, sb_valid;
  logic [7:0] sb_x, sb_y, prod;
  logic [1:0] j;          // state row read by the call being started
  logic       last_call;

  // byte (row, col) of a half
  function automatic logic [4:0] addr(input logic half, input logic [1:0] row,
                                      input logic [1:0] col);
    return {half, col, row};
  endfunction

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? MC_POLY : 8'h00);
  endfunction

  // ---------------------------------------------------------------- RAMs
  always_ff @(posedge clk) begin
    if (st_we) st_ram[st_wa] <= st_wd;
    if (k_we)  k_ram[k_wa]   <= k_wd;
  end
  assign st_q = st_ram[st_ra];
  assign k_q  = k_ram[k_ra];

  // ---------------------------------------------------------------- S-box
  if (ROT_SBOX) begin : g_rot
    logic sb_busy;   // not needed: the FSM waits for y_valid
    rs_sbox_par u_sbox (
      .clk, .rst_n, .start(sb_start), .x(sb_x), .y(sb_y), .y_valid(sb_valid), .busy(sb_busy)
    );
  end else begin : g_tab
    localparam logic [2047:0] SBOX_TAB = aes_sbox_table();
    assign sb_y     = SBOX_TAB[8*sb_x +: 8];
    assign sb_valid = 1'b1;
  end

  // Row of the state byte fed to the S-box by the call being started. With the
  // rotational S-box the next call starts when the previous result arrives;
  // with the table S-box call i reads row i in cycle i of the byte.
  always_comb begin
    if (round == 4'd10)     j = r;
    else if (!ROT_SBOX)     j = i;
    else                    j = wait_q ? i + 2'd1 : 2'd0;
  end
  assign last_call = (round == 4'd10) || (i == 2'd3);

  // MixColumns coefficient of the result of call i for output row r
  always_comb begin
    if (round == 4'd10) prod = sb_y;
    else unique case (2'(i - r))
      2'd0:    prod = xtime(sb_y);
      2'd1:    prod = xtime(sb_y) ^ sb_y;
      default: prod = sb_y;
    endcase
  end

  // ---------------------------------------------------------------- datapath control
  always_comb begin
    st_ra    = addr(h, j, 2'(c + j));
    k_ra     = '0;
    st_wa    = addr(~h, r, c);
    k_wa     = addr(~h, r, c);
    st_wd    = '0;
    k_wd     = '0;
    st_we    = 1'b0;
    k_we     = 1'b0;
    sb_start = 1'b0;
    sb_x     = st_q;
    ct_o     = '0;
    ct_valid = 1'b0;
    unique case (phase)
      B_LOAD: begin
        k_ra = {1'b0, cnt[3:0]};
        if (!cnt[4]) begin
          k_wa = {1'b0, cnt[3:0]};
          k_wd = key_i;
          k_we = 1'b1;
        end else begin
          st_wa = {1'b0, cnt[3:0]};
          st_wd = pt_i ^ k_q;
          st_we = 1'b1;
        end
      end
      B_KEY0: begin
        sb_x = k_q;
        if (!ROT_SBOX) begin
          // cycle 1: S-box on k(r+1,3) into acc; cycle 2: add k(r,0) and write
          if (!wait_q) k_ra = addr(h, r + 2'd1, 2'd3);
          else begin
            k_ra = addr(h, r, 2'd0);
            k_wd = k_q ^ acc;
            k_we = 1'b1;
          end
        end else if (!wait_q) begin
          k_ra     = addr(h, r + 2'd1, 2'd3);
          sb_start = 1'b1;
        end else if (sb_valid) begin
          k_ra = addr(h, r, 2'd0);
          k_wd = k_q ^ sb_y ^ ((r == 2'd0) ? rcon(round) : 8'h00);
          k_we = 1'b1;
        end
      end
      B_KEYA: k_ra = addr(~h, r, c - 2'd1);
      B_KEYB: begin
        k_ra = addr(h, r, c);
        k_wd = k_q ^ acc;
        k_we = 1'b1;
      end
      B_ST: begin
        k_ra = addr(~h, r, c);
        if (!ROT_SBOX) begin
          // write cycle: after the four reads, or at once in the last round
          if (wait_q || round == 4'd10) begin
            st_wd    = (round == 4'd10) ? (sb_y ^ k_q) : (acc ^ k_q);
            st_we    = 1'b1;
            ct_o     = st_wd;
            ct_valid = (round == 4'd10);
          end
        end else if (!wait_q) sb_start = 1'b1;
        else if (sb_valid) begin
          if (!last_call) sb_start = 1'b1;
          else begin
            st_wd    = acc ^ prod ^ k_q;
            st_we    = 1'b1;
            ct_o     = st_wd;
            ct_valid = (round == 4'd10);
          end
        end
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= B_IDLE;
      cnt    <= '0;
      r      <= '0;
      c      <= '0;
      i      <= '0;
      wait_q <= 1'b0;
      round  <= '0;
      h      <= 1'b0;
      acc    <= '0;
    end else begin
      unique case (phase)
        B_IDLE: if (start) begin
          phase <= B_LOAD;
          cnt   <= '0;
          h     <= 1'b0;
        end
        B_LOAD: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd31) begin
            phase <= B_KEY0;
            round <= 4'd1;
            r     <= '0;
            c     <= '0;
          end
        end
        B_KEY0: begin
          if (!wait_q) begin
            wait_q <= 1'b1;
            if (!ROT_SBOX) acc <= sb_y ^ ((r == 2'd0) ? rcon(round) : 8'h00);
          end else if (sb_valid) begin
            wait_q <= 1'b0;
            i      <= '0;
            acc    <= '0;
            phase  <= B_ST;
          end
        end
        B_KEYA: begin
          acc   <= k_q;
          phase <= B_KEYB;
        end
        B_KEYB: begin
          i     <= '0;
          acc   <= '0;
          phase <= B_ST;
        end
        B_ST: begin
          if (!ROT_SBOX && !wait_q && round != 4'd10) begin
            // table S-box: accumulate one term per cycle
            acc <= acc ^ prod;
            i   <= i + 2'd1;
            if (i == 2'd3) wait_q <= 1'b1;
          end else if (!ROT_SBOX || wait_q) begin
            if (ROT_SBOX && sb_valid && !last_call) begin
              acc <= acc ^ prod;
              i   <= i + 2'd1;
            end else if (!ROT_SBOX || sb_valid) begin
              wait_q <= 1'b0;
              r      <= r + 2'd1;
              if (r == 2'd3) c <= c + 2'd1;
              if (r == 2'd3 && c == 2'd3) phase <= B_REND;
              else if (r == 2'd3)         phase <= B_KEYA;
              else                        phase <= (c == 2'd0) ? B_KEY0 : B_KEYA;
            end
          end else wait_q <= 1'b1;
        end
        B_REND: begin
          h <= ~h;
          if (round == 4'd10) phase <= B_IDLE;
          else begin
            round <= round + 4'd1;
            phase <= B_KEY0;
          end
        end
        default: phase <= B_IDLE;
      endcase
    end
  end

  assign loading = (phase == B_LOAD);
  assign busy    = (phase != B_IDLE);
  assign done    = (phase == B_REND) && (round == 4'd10);
endmodule
