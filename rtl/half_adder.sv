// half_adder: one-bit half adder, used as the lowest bit of a ripple carry
// adder whose carry input is a constant 0.
//
// sum = a ^ b, cout = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end

endmodule
