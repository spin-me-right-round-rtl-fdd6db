// tb_aes_byte_serial: end-to-end test of the byte-serial AES-128, in both
// S-box variants side by side: the rotational S-box (default) and the
// one-cycle table S-box (ROT_SBOX = 0). Both instances load the same blocks
// at the same time: the FIPS-197 example, then random blocks. For each the
// sixteen ciphertext bytes are compared, in order, with the reference model,
// and the start-to-done latency is checked: 5538 busy cycles
// (32 + 9 x 589 + 205) and 1098 (32 + 9 x 113 + 49). Also checks that exactly
// 16 ciphertext bytes leave per block and that loading lasts 32 cycles.
module tb_aes_byte_serial;
  import aes_ref_pkg::*;

  localparam int NBLK = 5;
  localparam int LATENCY [2] = '{5538, 1098};

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] pt_i = '0, key_i = '0;
  logic [7:0] ct_o [2];
  logic [1:0] loading, ct_valid, busy, done;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_byte_serial dut (
    .clk, .rst_n, .start, .pt_i, .key_i, .loading(loading[0]), .ct_o(ct_o[0]),
    .ct_valid(ct_valid[0]), .busy(busy[0]), .done(done[0])
  );
  aes_byte_serial #(.ROT_SBOX(1'b0)) dut_tab (
    .clk, .rst_n, .start, .pt_i, .key_i, .loading(loading[1]), .ct_o(ct_o[1]),
    .ct_valid(ct_valid[1]), .busy(busy[1]), .done(done[1])
  );

  initial begin
    #(10 * (NBLK + 1) * 6000);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per instance: cycle and byte counters, collected ciphertext
  int   busy_cycles [2], load_cycles [2], nct [2];
  blk_t got [2];
  logic [1:0] finished;
  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (busy[d])    busy_cycles[d] <= busy_cycles[d] + 1;
      if (loading[d]) load_cycles[d] <= load_cycles[d] + 1;
      if (ct_valid[d]) begin
        if (nct[d] < 16) got[d][127 - 8*nct[d] -: 8] <= ct_o[d];
        nct[d] <= nct[d] + 1;
      end
      if (done[d]) finished[d] <= 1'b1;
    end
  end

  initial begin
    blk_t pt, key, exp_ct;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      if (b == 0) begin
        pt  = 128'h00112233445566778899aabbccddeeff;
        key = 128'h000102030405060708090a0b0c0d0e0f;
      end else begin
        pt  = rand_blk();
        key = rand_blk();
      end
      for (int d = 0; d < 2; d++) begin
        busy_cycles[d] = 0; load_cycles[d] = 0; nct[d] = 0; got[d] = '0;
      end
      finished = '0;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      for (int n = 0; n < 32; n++) begin
        key_i <= (n < 16) ? getb(key, n) : 8'($urandom);
        pt_i  <= (n < 16) ? 8'($urandom) : getb(pt, n - 16);
        @(posedge clk);
      end
      while (finished != 2'b11) @(posedge clk);
      @(negedge clk);
      exp_ct = encrypt(pt, key);
      for (int d = 0; d < 2; d++) begin
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (getb(got[d], k) !== getb(exp_ct, k)) failures++;
        end
        if (got[d] !== exp_ct) $display("variant %0d block %0d: got %032h expected %032h", d, b, got[d], exp_ct);
        else                   $display("variant %0d block %0d ok: %032h", d, b, got[d]);
        checks += 3;
        if (busy_cycles[d] != LATENCY[d]) begin
          failures++;
          $display("variant %0d: latency %0d, expected %0d", d, busy_cycles[d], LATENCY[d]);
        end
        if (nct[d] != 16) begin failures++; $display("variant %0d: %0d ciphertext bytes", d, nct[d]); end
        if (load_cycles[d] != 32) begin failures++; $display("variant %0d: %0d load cycles", d, load_cycles[d]); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
