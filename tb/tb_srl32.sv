// tb_srl32: random shifts and random read addresses against a queue model of
// the 32-bit shift register.
module tb_srl32;
  logic       clk = 1'b0, ce = 1'b0, d = 1'b0, q, q31;
  logic [4:0] a = '0;
  int         checks = 0, failures = 0;
  logic [31:0] m;

  always #5 clk = ~clk;

  srl32 dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill with known data
    for (int i = 0; i < 32; i++) begin
      ce <= 1'b1; d <= 1'($urandom);
      @(posedge clk);
    end
    ce <= 1'b0;
    @(negedge clk);
    for (int i = 0; i < 32; i++) begin a = 5'(i); #1; m[i] = q; end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ce <= 1'($urandom);
      d  <= 1'($urandom);
      a  <= 5'($urandom);
      #1;
      checks += 2;
      if (q !== m[a])    begin failures++; $display("q at %0d", a); end
      if (q31 !== m[31]) begin failures++; $display("q31"); end
      @(posedge clk);
      if (ce) m = {m[30:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
