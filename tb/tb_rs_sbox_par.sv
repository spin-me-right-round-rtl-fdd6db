// tb_rs_sbox_par: all 256 inputs of the byte-parallel-load rotational S-box,
// issued back to back (a new start in the cycle the previous result is
// valid), compared with the reference S-box. Also checks the 8-cycle latency
// and that a start while busy is ignored.
module tb_rs_sbox_par;
  import aes_ref_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] x = '0, y;
  logic       y_valid, busy;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs_sbox_par dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int v = 0; v < 256; v++) begin
      start <= 1'b1;
      x     <= 8'(v);
      @(posedge clk);
      // a start while busy must not disturb the evaluation
      start <= (v % 3 == 0);
      x     <= 8'(v) ^ 8'h5a;
      lat = 1;
      @(negedge clk);
      while (!y_valid) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 8) begin failures++; $display("latency %0d for %02h", lat, v); end
      if (y !== sbox(8'(v))) begin
        failures++;
        $display("S(%02h) = %02h, expected %02h", v, y, sbox(8'(v)));
      end
    end
    start <= 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
