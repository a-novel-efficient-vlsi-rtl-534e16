// csa_bec_group: one N-bit group of the carry select adder, with a binary to
// excess-1 converter (BEC) in place of the Cin=1 ripple carry adder.
//
// A conventional carry select group computes a + b twice, once for a carry in
// of 0 and once for 1, and lets the real carry choose. Here only the Cin=0 sum
// is computed by an adder (rca_cin0): its (N+1)-bit result {c, s} is fed to an
// (N+1)-bit BEC, which adds one and so gives the Cin=1 result
// a + b + 1 = {c, s} + 1 without a second adder. The cy_mux then takes
// the BEC word when sel (the carry out of the group below) is 1, the adder
// word when it is 0, and returns the group's sum bits and carry out.
//
// Ports: a, b are the group's operand bits; sel the carry from below; sum the
// group's sum bits; cout its carry out, which selects the next group. Purely
// combinational. The delay from sel to cout is one multiplexer, independent
// of N. The structure (adder, BEC, mux) follows the published 2-bit group;
// using it unchanged for 3, 4 and 5 bits matches the published 16-bit adder.
module csa_bec_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sel,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] res_c0;  // {carry, sum} of a + b
  logic [N:0] res_c1;  // {carry, sum} of a + b + 1, from the BEC
  logic [N:0] res;

  rca_cin0 #(.N(N)) u_rca (
    .a   (a),
    .b   (b),
    .sum (res_c0[N-1:0]),
    .cout(res_c0[N])
  );

  bec #(.N(N + 1)) u_bec (
    .b(res_c0),
    .x(res_c1)
  );

  cy_mux #(.N(N)) u_mux (
    .in0(res_c0),
    .in1(res_c1),
    .sel(sel),
    .out(res)
  );

  assign sum  = res[N-1:0];
  assign cout = res[N];

endmodule
