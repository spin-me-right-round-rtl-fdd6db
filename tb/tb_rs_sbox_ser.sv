// tb_rs_sbox_ser: all 256 inputs of the bit-serial rotational S-box, in a
// continuous stream: 8 load cycles (shifting the next input in and the
// previous result out, MSB first) and 8 compute cycles per byte, i.e. one
// result every 16 cycles. Results are compared with the reference S-box.
module tb_rs_sbox_ser;
  import aes_ref_pkg::*;
  import aes_rs_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, x_i = 1'b0, y_i;
  sbox_op_e op = SB_IDLE;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  rs_sbox_ser dut (.*);

  initial begin
    repeat (6000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev, got, inb;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int v = 0; v <= 256; v++) begin
      inb = 8'((v * 37 + 11) % 256);  // a permutation of 0..255
      for (int b = 7; b >= 0; b--) begin
        op  <= (b == 0) ? SB_LOAD_LAST : SB_LOAD;
        x_i <= inb[b];
        @(negedge clk);
        got[b] = y_i;
        @(posedge clk);
      end
      if (v > 0) begin
        checks++;
        if (got !== sbox(prev)) begin
          failures++;
          $display("S(%02h) = %02h, expected %02h", prev, got, sbox(prev));
        end
      end
      prev = inb;
      // idle cycles between load and compute must not matter
      if (v % 5 == 0) begin op <= SB_IDLE; repeat (3) @(posedge clk); end
      repeat (8) begin op <= SB_CALC; @(posedge clk); end
    end
    op <= SB_IDLE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
