// bec: N-bit binary to excess-1 converter, x = b + 1 (mod 2^N).
//
// Adding one needs no second operand, so the converter is much smaller than
// the ripple carry adder with Cin=1 it replaces. Bit 0 is inverted; every
// higher bit i is flipped when all bits below it are 1:
//   x[0] = ~b[0]
//   x[i] =  b[i] ^ (b[0] & ... & b[i-1])
// The AND terms are formed as a chain (one AND per bit), so the 3-bit case is
// one inverter, two XORs and one AND, the published 3-bit converter. For
// b = all ones the result wraps to all zeros. Purely combinational.
//
// The 3-bit case follows the published converter equations and truth table
// (x[2] = b[2] ^ (b[0] & b[1])); the same rule for N > 3 is this design's
// extension.
module bec #(
  parameter int unsigned N = 3  // at least 1
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);

  logic [N-1:0] all_ones_below;  // all_ones_below[i] = &b[i-1:0], 1 for i = 0

  assign all_ones_below[0] = 1'b1;
  assign x[0]              = ~b[0];

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign all_ones_below[i] = all_ones_below[i-1] & b[i-1];
    assign x[i]              = b[i] ^ all_ones_below[i];
  end

endmodule
