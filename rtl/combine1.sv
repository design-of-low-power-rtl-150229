// combine1: the "combine-1" circuit, which turns a sum into that sum plus one.
//
// A carry-select block needs the result of its addition for carry-in 0 and
// for carry-in 1. Rather than a second ripple carry adder, this circuit
// derives the carry-in 1 result {c1, s1} = {c0, s0} + 1 from the carry-in 0
// result {c0, s0}. Adding one to s0 flips every bit from the least
// significant bit up to and including the first bit that is zero, and leaves
// the bits above it alone. So a first-zero detector, a chain of AND gates,
// marks in run[i] that all of s0[i-1:0] are one, and bit i is complemented
// exactly when run[i] is set. When s0 holds no zero at all, run[WIDTH] is one
// and the increment overflows: that detector output becomes the carry, ORed
// with the carry c0 already produced by the adder.
//
// Ports: s0/c0 in, the adder's sum and carry for carry-in 0; s1/c1 out, the
// sum and carry for carry-in 1. Combinational, no clock; the delay is one
// AND chain of WIDTH gates plus one XOR. The detect-and-complement structure
// and the carry rule follow the source design; the AND-chain form of the
// detector is this implementation's choice.
module combine1 #(
  parameter int unsigned WIDTH = csa_pkg::CSA_WIDTH
) (
  input  logic [WIDTH-1:0] s0,
  input  logic             c0,
  output logic [WIDTH-1:0] s1,
  output logic             c1
);
  logic [WIDTH:0] run;  // run[i]: s0[i-1:0] are all ones (no zero seen yet)

  // first-zero detector: one AND gate per bit
  assign run[0] = 1'b1;
  for (genvar i = 0; i < WIDTH; i++) begin : g_detect
    assign run[i+1] = run[i] & s0[i];
  end

  always_comb begin
    // selective complement: invert up to and including the first zero
    s1 = s0 ^ run[WIDTH-1:0];
    // all bits one: the zero detector itself produces the carry
    c1 = c0 | run[WIDTH];
  end

  // The sum bits must be the increment of the input, modulo 2**WIDTH.
  always_comb begin
    assert (s1 == s0 + WIDTH'(1))
      else $error("combine1: s1 is not s0 + 1");
  end
endmodule
