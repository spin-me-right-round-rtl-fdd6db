// tb_aes_bs_key: drives the key array through all ten AES-128 key-schedule
// rounds. The testbench plays the S-box: it collects the bits the array
// presents on sbox_in, computes the S-box with the reference model and feeds
// the result back on sbox_out, following the row-operation sequence of the
// controller (rotate to column 3; four S-box evaluations on k(1,3), k(2,3),
// k(3,3), k(0,3) xored into column 0 of rows 0..3 with Rcon on row 0; then
// w[c] ^= w[c-1]). After each round the key is streamed out once around the
// 128-bit ring and compared with the reference key expansion.
module tb_aes_bs_key;
  import aes_ref_pkg::*;
  import aes_rs_pkg::*;

  logic        clk = 1'b0, din = 1'b0, sbox_out = 1'b0, rcon_bit = 1'b0;
  logic [1:0]  sbox_src = '0;
  k_op_e [3:0] op = {4{K_HOLD}};
  logic        head0, sbox_in;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_bs_key dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle();
    @(posedge clk);
    #1;
    op = {4{K_HOLD}};
    rcon_bit = 1'b0;
  endtask

  task automatic ring(input k_op_e o, input blk_t b, output blk_t old);
    old = '0;
    for (int n = 0; n < 128; n++) begin
      op  = {4{o}};
      din = stream_bit(b, n);
      old[127 - 8*(((n/8)%4)*4 + (n/8)/4) - (n%8)] = head0;
      cycle();
    end
  endtask

  initial begin
    blk_t k, got, dummy;
    logic [7:0] rc, sin, sres;
    #1;
    for (int t = 0; t < 3; t++) begin
      k = (t == 0) ? 128'h000102030405060708090a0b0c0d0e0f : rand_blk();
      ring(K_CHAIN_IN, k, dummy);
      rc = 8'h01;
      for (int r = 1; r <= 10; r++) begin
        repeat (24) begin op = {4{K_ROT}}; cycle(); end
        sres = '0;
        for (int s = 1; s <= 5; s++) begin
          // load phase: feed row s%4, write the previous result into row s-2
          for (int b = 7; b >= 0; b--) begin
            if (s <= 4) begin
              sbox_src = 2'(s % 4);
              op[s % 4] = K_ROT;
              #1;
              sin[b] = sbox_in;
            end
            if (s >= 2) begin
              op[s - 2] = K_SBOX;
              sbox_out  = sres[b];
              rcon_bit  = (s == 2) ? rc[b] : 1'b0;
            end
            if (s == 5) op[0] = K_HOLD;
            cycle();
          end
          sres = sbox(sin);
          if (s <= 4) repeat (8) begin op[0] = K_ROT; cycle(); end
        end
        repeat (24) begin op = {4{K_ADD}}; cycle(); end
        k = next_key(k, rc);
        ring(K_CHAIN_ROT, '0, got);
        checks++;
        if (got !== k) begin
          failures++;
          $display("round %0d key %032h expected %032h", r, got, k);
        end
        rc = gmul(rc, 8'h02);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
