// tb_masked_sbox: all 256 inputs, each split into two random shares, streamed
// through the masked bit-serial S-box: 8 load cycles and 18 compute cycles
// per byte (26 per result), fresh randomness every cycle. The xor of the
// output shares is compared with the reference S-box.
module tb_masked_sbox;
  import aes_ref_pkg::*;
  import aes_rs_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  x_i = '0, y_i;
  logic [17:0] r = '0;
  sbox_op_e    op = SB_IDLE;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(negedge clk) r <= 18'($urandom);

  masked_sbox dut (.*);

  initial begin
    repeat (9000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] prev, got, inb, m;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int v = 0; v <= 256; v++) begin
      inb = 8'((v * 37 + 11) % 256);
      m   = 8'($urandom);
      for (int b = 7; b >= 0; b--) begin
        op  <= (b == 0) ? SB_LOAD_LAST : SB_LOAD;
        x_i <= {m[b], inb[b] ^ m[b]};
        @(negedge clk);
        got[b] = y_i[0] ^ y_i[1];
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
      repeat (18) begin op <= SB_CALC; @(posedge clk); end
    end
    op <= SB_IDLE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
