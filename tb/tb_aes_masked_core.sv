// tb_aes_masked_core: end-to-end test of the masked bit-serial AES-128 core.
// Plaintext and key are split into two random Boolean shares; the two
// ciphertext shares are recombined and compared with the reference model. It
// checks the FIPS-197 example and random blocks, back to back, and the
// start-to-done latency of 6496 busy cycles. The blocks run the four settings
// of a side-channel evaluation: fresh randomness on or off, combined with
// random or all-zero initial masks of plaintext and key. Whenever either
// source of randomness is on, ciphertext share 0 alone must differ from the
// ciphertext; with both off, the core must behave as an unprotected AES
// (share 0 is the ciphertext, share 1 is zero).
module tb_aes_masked_core;
  import aes_ref_pkg::*;

  localparam int NBLK    = 5;
  localparam int LATENCY = 6496;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, prng_en = 1'b1;
  logic [1:0] pt_i = '0, key_i = '0;
  logic       loading, ct_valid, busy, done;
  logic [1:0] ct_o;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_masked_core dut (.*);

  blk_t pts [NBLK], keys [NBLK], pm [NBLK], km [NBLK];

  int busy_cycles = 0;
  always @(posedge clk) begin
    if (rst_n && busy) busy_cycles <= busy_cycles + 1;
    if (rst_n && done) begin
      checks++;
      if (busy_cycles != LATENCY) begin
        failures++;
        $display("latency %0d, expected %0d", busy_cycles, LATENCY);
      end
      busy_cycles <= 0;
    end
  end

  initial begin
    #(10 * (NBLK + 2) * 7000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t got, got0, exp_ct;
    pts[0]  = 128'h00112233445566778899aabbccddeeff;
    keys[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i < NBLK; i++) begin pts[i] = rand_blk(); keys[i] = rand_blk(); end
    for (int i = 0; i < NBLK; i++) begin pm[i] = rand_blk(); km[i] = rand_blk(); end
    // block 1: initial masking off; blocks 3 and 4: both off
    pm[1] = '0; km[1] = '0; pm[3] = '0; km[3] = '0; pm[4] = '0; km[4] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b <= NBLK; b++) begin
      prng_en <= (b != 2) && (b < 3);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      got = '0; got0 = '0;
      for (int n = 0; n < 128; n++) begin
        if (b < NBLK) begin
          pt_i  <= {stream_bit(pm[b], n),  stream_bit(pts[b] ^ pm[b], n)};
          key_i <= {stream_bit(km[b], n), stream_bit(keys[b] ^ km[b], n)};
        end else begin
          pt_i  <= '0;
          key_i <= '0;
        end
        @(negedge clk);
        if (!loading) begin failures++; $display("loading low at bit %0d", n); end
        if (b > 0) begin
          checks++;
          if (!ct_valid) begin failures++; $display("ct_valid low"); end
          got [127 - 8*(((n/8)%4)*4 + (n/8)/4) - (n%8)] = ct_o[0] ^ ct_o[1];
          got0[127 - 8*(((n/8)%4)*4 + (n/8)/4) - (n%8)] = ct_o[0];
        end
        @(posedge clk);
      end
      if (b > 0) begin
        exp_ct = encrypt(pts[b-1], keys[b-1]);
        checks++;
        if (got !== exp_ct) begin
          failures++;
          $display("block %0d: got %032h expected %032h", b-1, got, exp_ct);
        end else $display("block %0d ok: %032h", b-1, got);
        checks++;
        if ((b - 1 < 3) ? (got0 === exp_ct) : (got0 !== exp_ct)) begin
          failures++;
          $display("block %0d: share 0 %032h against ciphertext", b - 1, got0);
        end
      end
      if (b == NBLK) break;
      while (!done) @(posedge clk);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
