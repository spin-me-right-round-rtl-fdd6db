// tb_aes_bs_ctrl: runs the controller for the unmasked (8 compute cycles) and
// the masked (18) S-box and counts what it issues during one encryption: 128
// loading cycles, 200 S-box evaluations (16 state bytes and 4 key bytes in
// each of 10 rounds) with 8 or 18 compute commands each, ShiftRows shifts
// (0/8/16/24 per row and round), 9 x 32 MixColumns cycles, 10 x 4 x 8
// S-box-to-key cycles with Rcon on row 0 only in one of them per round, and
// the total busy time of 4496 and 6496 cycles.
module tb_aes_bs_ctrl;
  import aes_rs_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ctrl_t ctl [2];
  logic  loading [2], ct_valid [2], busy [2], done [2];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_bs_ctrl #(.CALC_CYCLES(8))  dut8  (.clk, .rst_n, .start, .ctl(ctl[0]), .loading(loading[0]),
                                         .ct_valid(ct_valid[0]), .busy(busy[0]), .done(done[0]));
  aes_bs_ctrl #(.CALC_CYCLES(18)) dut18 (.clk, .rst_n, .start, .ctl(ctl[1]), .loading(loading[1]),
                                         .ct_valid(ct_valid[1]), .busy(busy[1]), .done(done[1]));

  int n_load [2], n_last [2], n_calc [2], n_sr [2][4], n_mc [2], n_ksb [2], n_rcon_row [2], n_busy [2];
  int n_ctv [2];
  bit finished [2];

  for (genvar i = 0; i < 2; i++) begin : g_cnt
    always @(posedge clk) if (rst_n && !finished[i]) begin
      if (busy[i])     n_busy[i]++;
      if (loading[i])  n_load[i]++;
      if (ct_valid[i]) n_ctv[i]++;
      if (ctl[i].sbox_op == SB_LOAD_LAST) n_last[i]++;
      if (ctl[i].sbox_op == SB_CALC)      n_calc[i]++;
      if (ctl[i].st_sel == ST_ROT)
        for (int r = 0; r < 4; r++) if (ctl[i].st_en[r]) n_sr[i][r]++;
      if (ctl[i].st_sel == ST_MC && ctl[i].st_en == 4'b1111) n_mc[i]++;
      for (int r = 0; r < 4; r++) if (ctl[i].k_op[r] == K_SBOX) n_ksb[i]++;
      if (ctl[i].k_op[0] == K_SBOX && ctl[i].rcon_bit) n_rcon_row[i]++;
      if (done[i]) finished[i] = 1'b1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (finished[0] && finished[1]);
    for (int i = 0; i < 2; i++) begin
      expect_eq("busy",     n_busy[i], i ? 6496 : 4496);
      expect_eq("loading",  n_load[i], 128);
      expect_eq("ct_valid", n_ctv[i], 0);
      expect_eq("sbox evaluations", n_last[i], 200);
      expect_eq("compute cycles", n_calc[i], 200 * (i ? 18 : 8));
      for (int r = 0; r < 4; r++) expect_eq("shiftrows", n_sr[i][r], 10 * 8 * r);
      expect_eq("mixcolumns", n_mc[i], 9 * 32);
      expect_eq("key sbox cycles", n_ksb[i], 10 * 4 * 8);
      // Rcon bits set: 01,02,04,08,10,20,40,80,1b,36 have 1+1+1+1+1+1+1+1+4+4 ones
      expect_eq("rcon ones", n_rcon_row[i], 16);
    end
    // a second encryption shows the ciphertext window
    finished[0] = 1'b0;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    repeat (130) @(posedge clk);
    expect_eq("ct_valid second", n_ctv[0], 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
