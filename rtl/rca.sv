// rca: N-bit ripple carry adder with a carry input.
//
// A chain of N full adders; bit i's carry out is bit i+1's carry in, so the
// delay grows linearly with N. {cout, sum} = a + b + cin. Purely
// combinational. In the 16-bit square-root carry select adder it forms the
// least significant group (bits 1:0, N = 2) and its carry out selects the
// multiplexer of the next group. The figures draw this adder only as a box;
// building it from full adders with an external carry input is this design's
// reading of it.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;  // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
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
