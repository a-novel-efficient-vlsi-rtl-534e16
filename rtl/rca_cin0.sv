// rca_cin0: N-bit ripple carry adder whose carry input is tied to 0.
//
// With no carry coming in, the lowest bit needs only a half adder; the N-1
// bits above it are full adders in a ripple chain. {cout, sum} = a + b.
// Purely combinational. This is the Cin=0 adder of each carry-select group of
// the square-root carry select adder; for the 2-bit group it is one half adder
// and one full adder, as the architecture describes. Its (N+1)-bit result
// also feeds the binary to excess-1 converter that stands in for the Cin=1
// adder.
module rca_cin0 #(
  parameter int unsigned N = 2  // at least 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;  // c[i] is the carry into bit i; c[0] is never used

  assign c[0] = 1'b0;

  half_adder u_ha (
    .a   (a[0]),
    .b   (b[0]),
    .sum (sum[0]),
    .cout(c[1])
  );

  for (genvar i = 1; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
