// select_mux: bank of 2:1 multiplexers that picks one precomputed result.
//
// A carry-select block computes its result twice, once assuming carry-in 0
// (d0) and once assuming carry-in 1 (d1). When the real carry-in arrives on
// sel this bank passes d1 if sel is one and d0 otherwise, one multiplexer
// per bit. The top level routes the sum bits and the carry-out through it,
// so WIDTH defaults to the block size plus one. Combinational, no clock.
// The source design builds each multiplexer as a two-transistor
// pass-transistor cell; at the logic level that cell is a plain 2:1
// multiplexer, which is what is written here.
module select_mux #(
  parameter int unsigned WIDTH = csa_pkg::CSA_WIDTH + 1
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      y[i] = sel ? d1[i] : d0[i];
    end
  end
endmodule
