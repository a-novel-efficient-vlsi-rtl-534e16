// cy_mux: carry multiplexer 2(N+1):(N+1) of a carry-select group.
//
// Chooses between the group's two candidate results, each the word
// {carry, sum[N-1:0]}: in0 is the result for a carry in of 0 (from the Cin=0
// ripple carry adder), in1 the result for a carry in of 1 (from the binary to
// excess-1 converter). sel is the carry out of the group below: out = sel ?
// in1 : in0. N+1 two-input multiplexers share the one select line. Purely
// combinational; the select-to-output path is the only path on the adder's
// carry chain. The 2-bit group uses the 6:3 form (N = 2); the larger groups
// use 8:4, 10:5 and 12:6. The mux's gate structure and input order are this
// design's choice.
module cy_mux #(
  parameter int unsigned N = 2
) (
  input  logic [N:0] in0,
  input  logic [N:0] in1,
  input  logic       sel,
  output logic [N:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule
