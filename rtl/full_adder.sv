// full_adder: one-bit full adder.
//
// Adds operand bits a and b and the carry-in ci, giving the sum bit s and
// the carry-out co. Purely combinational, no clock. The source design only
// names the full-adder cell; the gate form used here (sum as a three-input
// XOR, carry as the majority of the three inputs) is the textbook one and a
// choice of this implementation.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;  // propagate: exactly one operand bit set

  always_comb begin
    p  = a ^ b;
    s  = p ^ ci;
    co = (a & b) | (p & ci);
  end
endmodule
