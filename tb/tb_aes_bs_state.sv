// tb_aes_bs_state: drives the state array directly. For random blocks it
// loads the block through the chain, applies ShiftRows (row r shifts 8r
// times), MixColumns (32 cycles) or a SubBytes pass (the chain takes a stream
// from the S-box input while the old state leaves on head0), reads the block
// back through the chain and compares with the reference model.
module tb_aes_bs_state;
  import aes_ref_pkg::*;
  import aes_rs_pkg::*;

  logic       clk = 1'b0, mc_first = 1'b0, din = 1'b0, sbox_out = 1'b0, head0;
  logic [3:0] en = '0;
  logic [2:0] bit_idx = '0;
  st_sel_e    sel = ST_ROT;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_bs_state dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shift a block in while the old one leaves; returns the old one
  task automatic stream(input blk_t b, input st_sel_e s, output blk_t old);
    old = '0;
    for (int n = 0; n < 128; n++) begin
      @(negedge clk);
      en  = 4'b1111;
      sel = s;
      // in ST_CHAIN_SBOX the external bit is the complement, so a wrong
      // input selection shows up in the next block read out
      din      = stream_bit(b, n) ^ (s == ST_CHAIN_SBOX);
      sbox_out = stream_bit(b, n);
      #1;
      old[127 - 8*(((n/8)%4)*4 + (n/8)/4) - (n%8)] = head0;
    end
    @(negedge clk);
    en = '0;
  endtask

  task automatic check(input string what, input blk_t got, input blk_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %032h expected %032h", what, got, exp);
    end
  endtask

  initial begin
    blk_t a, b, got;
    for (int i = 0; i < 20; i++) begin
      a = rand_blk();
      stream(a, ST_CHAIN_IN, got);
      // load / read back
      b = rand_blk();
      stream(b, ST_CHAIN_IN, got);
      check("load", got, a);
      // ShiftRows
      for (int c = 0; c < 24; c++) begin
        @(negedge clk);
        sel = ST_ROT;
        for (int r = 0; r < 4; r++) en[r] = (c < 8*r);
      end
      @(negedge clk);
      en = '0;
      a = rand_blk();
      stream(a, ST_CHAIN_IN, got);
      check("shiftrows", got, shift_rows(b));
      // MixColumns
      for (int c = 0; c < 32; c++) begin
        @(negedge clk);
        sel      = ST_MC;
        en       = 4'b1111;
        mc_first = (c % 8 == 0);
        bit_idx  = 3'(7 - c % 8);
      end
      @(negedge clk);
      en = '0;
      b = rand_blk();
      stream(b, ST_CHAIN_SBOX, got);
      check("mixcolumns", got, mix_columns(a));
      // the S-box path
      stream(rand_blk(), ST_CHAIN_IN, got);
      check("sbox path", got, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
