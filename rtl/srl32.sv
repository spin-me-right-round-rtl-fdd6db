// srl32: 32-bit shift register with an addressable read port, the behaviour of
// a LUT configured as a shift register (SRLC32E).
//
// When ce is high, on the rising clock edge every bit moves up by one
// position and d enters position 0. q31 is the bit in position 31, the oldest
// one, which is also the serial output that can be chained into the next
// register. q is the bit at position a, read combinationally. The arrays of the
// bit-serial AES use one srl32 per row: position 31 is the head of the row,
// and a = 30 or a = 7 taps the bit right behind the head or eight places
// before the tail. There is no reset, as in the FPGA primitive: the contents
// are defined by loading data.
module srl32 (
  input  logic       clk,
  input  logic       ce,
  input  logic       d,
  input  logic [4:0] a,
  output logic       q,
  output logic       q31
);
  logic [31:0] mem;

  always_ff @(posedge clk)
    if (ce) mem <= {mem[30:0], d};

  assign q   = mem[a];
  assign q31 = mem[31];
endmodule
