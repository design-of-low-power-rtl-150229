// rca: ripple carry adder built from a chain of full adders.
//
// Bit i of a and b is added in full adder i together with the carry out of
// bit i-1; bit 0 takes the carry-in ci and the last carry leaves as co. The
// result {co, s} equals a + b + ci. Combinational; the delay grows linearly
// with WIDTH because the carry ripples through every stage. The chain of
// full adders follows the source design's block diagram; the width default
// of four is its block size.
module rca #(
  parameter int unsigned WIDTH = csa_pkg::CSA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;  // c[i] is the carry into bit i

  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[WIDTH];
endmodule
