// full_adder: one-bit full adder, the cell the ripple carry adders are made of.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational. The
// gate-level form is the textbook one; no particular full adder circuit is
// prescribed by the architecture.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
