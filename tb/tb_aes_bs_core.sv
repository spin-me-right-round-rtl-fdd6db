// tb_aes_bs_core: end-to-end test of the bit-serial AES-128 core against the
// reference model: the FIPS-197 example and random blocks, loaded back to
// back so that each ciphertext leaves while the next block enters. Checks
// every ciphertext and the start-to-done latency of 4496 cycles. It also
// watches the S-box input of the first round: the sixteen SubBytes
// evaluations must take state^key bytes in row-major order 0, 4, 8, 12, 1,
// 5, ..., the order the state leaves the row chain.
module tb_aes_bs_core;
  import aes_ref_pkg::*;
  import aes_rs_pkg::*;

  localparam int NBLK    = 6;
  localparam int LATENCY = 4496;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, pt_i = 1'b0, key_i = 1'b0;
  logic loading, ct_o, ct_valid, busy, done;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_bs_core dut (.*);

  blk_t pts [NBLK], keys [NBLK];

  // an encryption keeps the core busy for LATENCY cycles (LOAD included)
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

  // S-box inputs of the first SubBytes pass of the first block
  int         nsb = 0;
  logic [7:0] sb_in = '0;
  always @(posedge clk) begin
    if (rst_n && nsb < 128 && !loading && !dut.ctl.sbox_from_key &&
        (dut.ctl.sbox_op == SB_LOAD || dut.ctl.sbox_op == SB_LOAD_LAST)) begin
      automatic logic [7:0] v = {sb_in[6:0], dut.sbox_x};
      automatic int k = nsb / 8;
      sb_in <= v;
      nsb   <= nsb + 1;
      if (nsb % 8 == 7) begin
        checks++;
        if (v !== (getb(pts[0], (k % 4) * 4 + k / 4) ^ getb(keys[0], (k % 4) * 4 + k / 4))) begin
          failures++;
          $display("S-box evaluation %0d: input %02h, expected byte %0d", k, v, (k % 4) * 4 + k / 4);
        end
      end
    end
  end

  initial begin
    #(10 * (NBLK + 2) * 5000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t got, exp_ct;
    pts[0]  = 128'h00112233445566778899aabbccddeeff;
    keys[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i < NBLK; i++) begin pts[i] = rand_blk(); keys[i] = rand_blk(); end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b <= NBLK; b++) begin
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      got = '0;
      for (int n = 0; n < 128; n++) begin
        pt_i  <= (b < NBLK) ? stream_bit(pts[b], n)  : 1'b0;
        key_i <= (b < NBLK) ? stream_bit(keys[b], n) : 1'b0;
        @(negedge clk);
        if (!loading) begin failures++; $display("loading low at bit %0d", n); end
        if (b > 0) begin
          checks++;
          if (!ct_valid) begin failures++; $display("ct_valid low"); end
          // place the bit back at its position in the block
          got[127 - 8*(((n/8)%4)*4 + (n/8)/4) - (n%8)] = ct_o;
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
      end
      if (b == NBLK) break;
      while (!done) @(posedge clk);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
