// tb_aes_bs_mixcol: streams random columns MSB first through the bit-serial
// MixColumns (heads, next-bit taps, mc_first and bit index driven as the state
// array does) and compares the four output bytes with the reference
// MixColumns.
module tb_aes_bs_mixcol;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, en = 1'b0, mc_first = 1'b0;
  logic [2:0] bit_idx = '0;
  logic [3:0] head = '0, next = '0, mc;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_bs_mixcol dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a [4], nxt [4], got [4], e;
    for (int i = 0; i < 500; i++) begin
      for (int r = 0; r < 4; r++) begin a[r] = 8'($urandom); nxt[r] = 8'($urandom); end
      if (i == 0) begin a[0] = 8'hdb; a[1] = 8'h13; a[2] = 8'h53; a[3] = 8'h45; end
      for (int t = 0; t < 8; t++) begin
        @(negedge clk);
        en       = 1'b1;
        mc_first = (t == 0);
        bit_idx  = 3'(7 - t);
        for (int r = 0; r < 4; r++) begin
          head[r] = a[r][7 - t];
          next[r] = (t == 7) ? nxt[r][7] : a[r][6 - t];
        end
        #1;
        for (int r = 0; r < 4; r++) got[r][7 - t] = mc[r];
      end
      for (int r = 0; r < 4; r++) begin
        e = gmul(a[r], 2) ^ gmul(a[(r+1)%4], 3) ^ a[(r+2)%4] ^ a[(r+3)%4];
        checks++;
        if (got[r] !== e) begin failures++; $display("row %0d: %02h expected %02h", r, got[r], e); end
      end
      if (i == 0 && got[0] !== 8'h8e) begin failures++; $display("FIPS column"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
