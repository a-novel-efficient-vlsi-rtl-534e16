// sqrt_csa16_bec: 16-bit square-root carry select adder in which each group's
// Cin=1 ripple carry adder is replaced by a binary to excess-1 converter.
//
// {cout, sum} = a + b + cin. The operands are split into five groups of
// 2, 2, 3, 4 and 5 bits (bits 1:0, 3:2, 6:4, 10:7, 15:11). Group 0 is a plain
// 2-bit ripple carry adder taking cin. Each higher group (csa_bec_group)
// computes its Cin=0 sum with a small ripple carry adder, derives the Cin=1
// sum from it with a BEC, and lets the carry out of the group below pick one
// of the two through its carry multiplexer. The group widths grow by about
// one bit per group, so each group's candidates settle at about the time the
// selecting carry reaches it; the carry path itself is one mux per group.
//
// Ports: a, b, cin in; sum, cout out (50 signals). Purely combinational: no
// clock, no reset, the result is valid one combinational delay after the
// inputs change. Group sizes, the BEC in place of the Cin=1 adder, and the
// mux sizes (6:3, 8:4, 10:5, 12:6) follow the published architecture; the
// carry input on bits 1:0 and the gate-level cells are this design's choices.
module sqrt_csa16_bec
  import sqrt_csa_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // grp_c[g] is the carry out of group g; grp_c[NUM_GROUPS-1] is cout.
  logic [NUM_GROUPS-1:0] grp_c;

  localparam int unsigned W0 = group_width(0);

  rca #(.N(W0)) u_grp0 (
    .a   (a[W0-1:0]),
    .b   (b[W0-1:0]),
    .cin (cin),
    .sum (sum[W0-1:0]),
    .cout(grp_c[0])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned W   = group_width(g);

    csa_bec_group #(.N(W)) u_grp (
      .a   (a[LSB+W-1:LSB]),
      .b   (b[LSB+W-1:LSB]),
      .sel (grp_c[g-1]),
      .sum (sum[LSB+W-1:LSB]),
      .cout(grp_c[g])
    );
  end

  assign cout = grp_c[NUM_GROUPS-1];

endmodule
