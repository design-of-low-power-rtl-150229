// csa_combine1: carry-select adder block with a single ripple carry adder.
//
// A conventional carry-select block holds two ripple carry adders, one
// computing a + b with carry-in 0 and one with carry-in 1, and lets the real
// carry-in pick between them, so the block's result is ready as soon as its
// carry-in is. This block keeps only the carry-in 0 adder. Its result
// {c0, s0} feeds the combine-1 circuit, which forms {c1, s1} = {c0, s0} + 1
// by first-zero detection and selective complement, the carry-in 1 result
// without a second adder. A bank of 2:1 multiplexers then passes {c1, s1}
// when cin is one and {c0, s0} otherwise.
//
// Ports: a, b operands; cin carry-in (the select of the multiplexers);
// sum, cout the result, {cout, sum} = a + b + cin. Combinational, no clock.
// The structure, the four-bit default width and the carry rule of the
// combine-1 circuit follow the source design; the gate forms inside each
// part are this implementation's choices.
module csa_combine1 #(
  parameter int unsigned WIDTH = csa_pkg::CSA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] s0, s1;  // sums for carry-in 0 and carry-in 1
  logic             c0, c1;  // carries for carry-in 0 and carry-in 1

  rca #(.WIDTH(WIDTH)) u_rca (
    .a (a),
    .b (b),
    .ci(1'b0),
    .s (s0),
    .co(c0)
  );

  combine1 #(.WIDTH(WIDTH)) u_combine1 (
    .s0(s0),
    .c0(c0),
    .s1(s1),
    .c1(c1)
  );

  select_mux #(.WIDTH(WIDTH + 1)) u_mux (
    .d0 ({c0, s0}),
    .d1 ({c1, s1}),
    .sel(cin),
    .y  ({cout, sum})
  );
endmodule
