// lfsr31: fresh-mask generator, a 31-bit Fibonacci LFSR with feedback
// polynomial x^31 + x^28 + 1 (period 2^31 - 1), clocked on the falling edge
// so that its transitions sit half a cycle away from those of the masked
// core. One bit per cycle leaves on q. The register is set to SEED (which
// must be non-zero) during reset; while en is low the register holds and q
// is forced to 0, which switches the fresh randomness off.
//
// Polynomial, period and falling-edge clocking follow the reference design;
// the seed, the reset and the enable are this design's own.
module lfsr31 #(
  parameter logic [30:0] SEED = 31'h1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic q
);
  logic [30:0] s;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)  s <= SEED;
    else if (en) s <= {s[29:0], s[30] ^ s[27]};
  end

  assign q = en & s[30];
endmodule
