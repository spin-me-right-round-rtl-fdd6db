// tb_lfsr31: compares the LFSR output with the recurrence of x^31 + x^28 + 1
// (next state = {s[29:0], s[30] ^ s[27]}), checks that the
// output changes on the falling clock edge, that en = 0 forces 0 and holds
// the state, and that the state never becomes zero.
module tb_lfsr31;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, q;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr31 #(.SEED(31'h12345678)) dut (.*);

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [30:0] m;
    m = 31'h12345678;
    #1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    #1;
    m = {m[29:0], m[30] ^ m[27]};   // first shift after reset release
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (q !== (en & m[30])) begin failures++; $display("bit %0d: %b expected %b", n, q, en & m[30]); end
      if (n == 700) en <= 1'b0;
      if (n == 720) en <= 1'b1;
      @(negedge clk);
      #1;
      if (en) begin
        m = {m[29:0], m[30] ^ m[27]};
        checks++;
        if (m == '0) begin failures++; $display("state zero"); end
      end else begin
        checks++;
        if (q !== 1'b0) begin failures++; $display("q not 0 while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
