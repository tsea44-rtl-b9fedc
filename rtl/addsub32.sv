// addsub32: W-bit adder/subtractor, s = a + b when sub is 0 and s = a - b
// when sub is 1 (two's complement, result modulo 2^W). Purely combinational;
// subtraction adds the inverted b with a carry-in of one, so a single adder
// serves both operations. The 32-bit width is the example's; the single-adder
// structure is this design's choice.
module addsub32 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s
);
  always_comb s = a + (b ^ {W{sub}}) + W'(sub);
endmodule
