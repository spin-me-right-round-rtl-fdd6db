// tb_masked_gf: random two-share inputs, fresh randomness and selections into
// the masked G*/F* block. One cycle later the xor of the two output shares
// must equal G*(x) (sel = 0) or F*(x) (sel = 1), computed from x^26 and x^49 in
// the normal basis beta = 205 by the reference model. Also checks that share
// 0 alone does not follow the unmasked value (the refresh is active), and
// non-completeness: flipping share 0 and flipping share 1 of one variable
// must never both change the same one of the 48 registered terms.
module tb_masked_gf;
  import aes_ref_pkg::*;

  logic        clk = 1'b0, sel = 1'b0;
  logic [7:0]  x0 = '0, x1 = '0;
  logic [17:0] r = '0;
  logic [1:0]  y;
  int          checks = 0, failures = 0, differ = 0;
  logic        gref [256], fref [256];

  always #5 clk = ~clk;

  masked_gf dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the 48 terms entering the register, flattened
  function automatic logic [47:0] terms();
    logic [47:0] t;
    for (int p = 0; p < 6; p++) t[8*p +: 8] = dut.terms_d[p];
    return t;
  endfunction

  initial begin
    logic [7:0] xv;
    logic [47:0] t0, ta, tb, both;
    logic       e;
    for (int v = 0; v < 256; v++) begin
      gref[v] = nb_power_bit(8'd205, 26, 8'(v));
      fref[v] = nb_power_bit(8'd205, 49, 8'(v));
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      xv = 8'(n < 512 ? n % 256 : $urandom);
      x0 = 8'($urandom);
      x1 = x0 ^ xv;
      r  = 18'($urandom);
      @(negedge clk);
      sel = 1'($urandom);
      x0 = 8'($urandom); x1 = 8'($urandom); r = 18'($urandom);   // next input must not matter
      #1;
      e = sel ? fref[xv] : gref[xv];
      checks++;
      if ((y[0] ^ y[1]) !== e) begin
        failures++;
        $display("x=%02h sel=%0b: %b expected %b", xv, sel, y[0] ^ y[1], e);
      end
      if (y[0] !== e) differ++;
    end
    // non-completeness, with the fresh randomness held at zero
    both = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      x0 = 8'($urandom); x1 = 8'($urandom); r = '0;
      for (int v = 0; v < 8; v++) begin
        x0 = x0 ^ 8'(1 << v); #1; ta = terms();
        x0 = x0 ^ 8'(1 << v); #1; t0 = terms();
        x1 = x1 ^ 8'(1 << v); #1; tb = terms();
        x1 = x1 ^ 8'(1 << v); #1;
        both |= (ta ^ t0) & (tb ^ t0);
      end
    end
    checks++;
    if (both != '0) begin failures++; $display("terms seeing both shares of a variable: %012h", both); end
    checks++;
    if (differ < 1000) begin failures++; $display("share 0 follows the value (%0d)", differ); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
