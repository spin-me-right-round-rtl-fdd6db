// tb_aes_rs_top: end-to-end test of the whole design at its default sizes.
// In parallel it
//   - encrypts three blocks back to back on the bit-serial AES (FIPS-197
//     example first), each ciphertext leaving while the next block loads;
//   - encrypts three blocks on the masked AES with random input shares, the
//     fresh randomness on for two blocks and off for one;
//   - encrypts two blocks on the byte-serial AES (FIPS-197 example first);
//   - runs 64 back-to-back evaluations of the byte-parallel-load S-box.
// Ciphertexts and S-box outputs are compared with the reference model. It
// also counts how often each mechanism happened (S-box loads from state and
// from key, ShiftRows, MixColumns, the Rcon injection, the ciphertext leaving
// during a load, both PRNG settings, the pre-charge register holding zero
// while the clock is high, an S-box start in the result cycle; for the
// byte-serial AES the key S-box calls, the four-call MixColumns bytes, the
// one-call bytes of the last round and the swap of the RAM halves) and counts a
// failure for any that never happened.
module tb_aes_rs_top;
  import aes_ref_pkg::*;
  import aes_rs_pkg::*;

  localparam int NBLK = 3;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       aes_start = 1'b0, aes_pt_i = 1'b0, aes_key_i = 1'b0;
  logic       aes_loading, aes_ct_o, aes_ct_valid, aes_busy, aes_done;
  logic       maes_start = 1'b0, maes_prng_en = 1'b1;
  logic [1:0] maes_pt_i = '0, maes_key_i = '0;
  logic       maes_loading, maes_ct_valid, maes_busy, maes_done;
  logic [1:0] maes_ct_o;
  logic       bss_start = 1'b0;
  logic [7:0] bss_pt_i = '0, bss_key_i = '0, bss_ct_o;
  logic       bss_loading, bss_ct_valid, bss_busy, bss_done;
  logic       sb_start = 1'b0;
  logic [7:0] sb_x = '0, sb_y;
  logic       sb_y_valid, sb_busy;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_rs_top dut (.*);

  // ------------------------------------------------------ mechanism counters
  typedef enum int {
    M_SUB_STATE, M_SUB_KEY, M_SHIFTROWS, M_MIXCOL, M_RCON, M_CT_OUT,
    M_MSUB_STATE, M_MSUB_KEY, M_MMIXCOL, M_PRNG_ON, M_PRNG_OFF, M_PRECHARGE,
    M_SB8_B2B, M_BSS_KEYSB, M_BSS_MC4, M_BSS_LAST, M_BSS_SWAP, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"sbox from state", "sbox from key", "shiftrows", "mixcolumns",
    "rcon", "ciphertext during load", "masked sbox from state", "masked sbox from key",
    "masked mixcolumns", "prng on", "prng off", "precharge zero", "sbox8 back-to-back",
    "bytewise key sbox call", "bytewise 4-call mixcolumns", "bytewise last-round byte",
    "bytewise ram half swap"};

  always @(posedge clk) if (rst_n) begin
    if (dut.u_aes.ctl.sbox_op == SB_LOAD_LAST && !dut.u_aes.ctl.sbox_from_key) mech[M_SUB_STATE]++;
    if (dut.u_aes.ctl.sbox_op == SB_LOAD_LAST &&  dut.u_aes.ctl.sbox_from_key) mech[M_SUB_KEY]++;
    if (dut.u_aes.ctl.st_sel == ST_ROT && dut.u_aes.ctl.st_en[3]) mech[M_SHIFTROWS]++;
    if (dut.u_aes.ctl.st_sel == ST_MC && dut.u_aes.ctl.st_en[0]) mech[M_MIXCOL]++;
    if (dut.u_aes.ctl.rcon_bit) mech[M_RCON]++;
    if (aes_ct_valid) mech[M_CT_OUT]++;
    if (dut.u_maes.ctl.sbox_op == SB_LOAD_LAST && !dut.u_maes.ctl.sbox_from_key) mech[M_MSUB_STATE]++;
    if (dut.u_maes.ctl.sbox_op == SB_LOAD_LAST &&  dut.u_maes.ctl.sbox_from_key) mech[M_MSUB_KEY]++;
    if (dut.u_maes.ctl.st_sel == ST_MC && dut.u_maes.ctl.st_en[0]) mech[M_MMIXCOL]++;
    if (maes_busy &&  maes_prng_en) mech[M_PRNG_ON]++;
    if (maes_busy && !maes_prng_en) mech[M_PRNG_OFF]++;
    if (sb_start && sb_y_valid) mech[M_SB8_B2B]++;
    // byte-serial FSM phases: 2 = key byte of column 0, 5 = state byte, 6 = round end
    if (int'(dut.u_bss.phase) == 2 && dut.u_bss.sb_start) mech[M_BSS_KEYSB]++;
    if (int'(dut.u_bss.phase) == 5 && dut.u_bss.sb_valid && dut.u_bss.i == 2'd3 &&
        dut.u_bss.round != 4'd10) mech[M_BSS_MC4]++;
    if (bss_ct_valid) mech[M_BSS_LAST]++;
    if (int'(dut.u_bss.phase) == 6) mech[M_BSS_SWAP]++;
  end
  // the pre-charge register must read zero in the high phase of the clock
  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (dut.u_maes.u_sbox.pre[0] != 8'h00 || dut.u_maes.u_sbox.pre[1] != 8'h00) begin
      failures++;
      $display("pre-charge register not cleared");
    end else mech[M_PRECHARGE]++;
  end

  initial begin
    #(10 * 50000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pos(input int n);
    return 127 - 8*(((n/8)%4)*4 + (n/8)/4) - (n%8);
  endfunction

  task automatic run_aes();
    blk_t pts [NBLK], keys [NBLK], got;
    pts[0]  = 128'h00112233445566778899aabbccddeeff;
    keys[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i < NBLK; i++) begin pts[i] = rand_blk(); keys[i] = rand_blk(); end
    for (int b = 0; b <= NBLK; b++) begin
      aes_start <= 1'b1;
      @(posedge clk);
      aes_start <= 1'b0;
      for (int n = 0; n < 128; n++) begin
        aes_pt_i  <= (b < NBLK) ? stream_bit(pts[b], n)  : 1'b0;
        aes_key_i <= (b < NBLK) ? stream_bit(keys[b], n) : 1'b0;
        @(negedge clk);
        if (b > 0) got[pos(n)] = aes_ct_o;
        @(posedge clk);
      end
      if (b > 0) begin
        checks++;
        if (got !== encrypt(pts[b-1], keys[b-1])) begin
          failures++;
          $display("aes block %0d: %032h expected %032h", b-1, got, encrypt(pts[b-1], keys[b-1]));
        end
      end
      if (b < NBLK) begin
        while (!aes_done) @(posedge clk);
        @(posedge clk);
      end
    end
  endtask

  task automatic run_maes();
    blk_t pts [NBLK], keys [NBLK], pm, km, got;
    pts[0]  = 128'h00112233445566778899aabbccddeeff;
    keys[0] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 1; i < NBLK; i++) begin pts[i] = rand_blk(); keys[i] = rand_blk(); end
    for (int b = 0; b <= NBLK; b++) begin
      pm = rand_blk(); km = rand_blk();
      maes_prng_en <= (b != 1);
      maes_start <= 1'b1;
      @(posedge clk);
      maes_start <= 1'b0;
      for (int n = 0; n < 128; n++) begin
        maes_pt_i  <= (b < NBLK) ? {stream_bit(pm, n), stream_bit(pts[b] ^ pm, n)}  : 2'b00;
        maes_key_i <= (b < NBLK) ? {stream_bit(km, n), stream_bit(keys[b] ^ km, n)} : 2'b00;
        @(negedge clk);
        if (b > 0) got[pos(n)] = maes_ct_o[0] ^ maes_ct_o[1];
        @(posedge clk);
      end
      if (b > 0) begin
        checks++;
        if (got !== encrypt(pts[b-1], keys[b-1])) begin
          failures++;
          $display("masked block %0d: %032h expected %032h", b-1, got, encrypt(pts[b-1], keys[b-1]));
        end
      end
      if (b < NBLK) begin
        while (!maes_done) @(posedge clk);
        @(posedge clk);
      end
    end
  endtask

  task automatic run_bss();
    blk_t pt, key, got;
    int   nb;
    for (int b = 0; b < 2; b++) begin
      pt  = (b == 0) ? 128'h00112233445566778899aabbccddeeff : rand_blk();
      key = (b == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand_blk();
      bss_start <= 1'b1;
      @(posedge clk);
      bss_start <= 1'b0;
      for (int n = 0; n < 32; n++) begin
        bss_key_i <= (n < 16) ? getb(key, n) : 8'h00;
        bss_pt_i  <= (n < 16) ? 8'h00 : getb(pt, n - 16);
        @(posedge clk);
      end
      nb = 0;
      while (!bss_done) begin
        @(negedge clk);
        if (bss_ct_valid && nb < 16) begin got[127 - 8*nb -: 8] = bss_ct_o; nb++; end
        @(posedge clk);
      end
      checks++;
      if (nb != 16 || got !== encrypt(pt, key)) begin
        failures++;
        $display("byte-serial block %0d: %032h expected %032h", b, got, encrypt(pt, key));
      end
      @(posedge clk);
    end
  endtask

  task automatic run_sbox8();
    logic [7:0] v, prev;
    for (int i = 0; i <= 64; i++) begin
      v = 8'($urandom);
      sb_start <= (i < 64);
      sb_x     <= v;
      @(posedge clk);
      sb_start <= 1'b0;
      if (i > 0) begin
        checks++;
        if (sb_y !== sbox(prev)) begin failures++; $display("sbox8 %02h", prev); end
      end
      prev = v;
      if (i == 64) break;
      // give the next start in the cycle the result is valid
      @(negedge clk);
      while (!sb_y_valid) @(negedge clk);
      checks++;
      if (sb_y !== sbox(prev)) begin failures++; $display("sbox8 %02h: %02h", prev, sb_y); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fork
      run_aes();
      run_maes();
      run_bss();
      run_sbox8();
    join
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("%-26s %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin failures++; $display("mechanism never happened: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
