// tb_sqrt_csa16_bec: end-to-end self-checking test of the 16-bit square-root
// carry select adder, at its only (full) size.
//
// Applies directed corner cases (zero, all ones, a carry that has to travel
// from bit 0 to cout, one carry entering each group boundary) and then
// NUM_RANDOM random operand pairs with a random carry in. {cout, sum} is
// compared with a + b + cin computed as a 17-bit arithmetic sum. The test
// also reads the group carries inside the adder and counts, per group, how
// often its multiplexer chose the excess-1 (Cin=1) result and how often the
// Cin=0 adder result; a group that never used one of them, a run with no
// carry out, or one with no carry rippling through every group counts a
// failure. Combinational: one operand pair per time step, with a watchdog.
module tb_sqrt_csa16_bec;
  import sqrt_csa_pkg::*;

  localparam int unsigned NUM_RANDOM = 200000;
  localparam int unsigned WATCHDOG   = NUM_RANDOM + 10000;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned sel1_cnt [NUM_GROUPS];  // group g's mux took the excess-1 result
  int unsigned sel0_cnt [NUM_GROUPS];  // group g's mux took the Cin=0 result
  int unsigned cout_cnt = 0;
  int unsigned full_ripple_cnt = 0;   // every group carry was 1

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;

  sqrt_csa16_bec u_dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [WIDTH-1:0] ta, input logic [WIDTH-1:0] tb,
                       input logic tc);
    logic [WIDTH:0] expected;
    a = ta; b = tb; cin = tc;
    #1;
    expected = {1'b0, ta} + {1'b0, tb} + {{WIDTH{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h, expected %h", ta, tb, tc, {cout, sum}, expected);
    end
    // Group g (g >= 1) is selected by the carry out of group g-1.
    for (int g = 1; g < NUM_GROUPS; g++) begin
      if (u_dut.grp_c[g-1]) sel1_cnt[g]++;
      else                  sel0_cnt[g]++;
    end
    if (cout) cout_cnt++;
    if (&u_dut.grp_c) full_ripple_cnt++;
  endtask

  initial begin
    for (int g = 0; g < NUM_GROUPS; g++) begin
      sel1_cnt[g] = 0;
      sel0_cnt[g] = 0;
    end

    // Directed cases.
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'hFFFF, 16'hFFFF, 1'b1);
    apply(16'hFFFF, 16'h0000, 1'b1);   // carry from bit 0 through every group
    apply(16'h0000, 16'hFFFF, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);   // carry out only
    apply(16'h7FFF, 16'h0001, 1'b0);
    for (int g = 1; g < NUM_GROUPS; g++) begin
      // A carry generated just below group g, with group g all ones on one
      // operand so the excess-1 result must ripple through the whole group.
      logic [WIDTH-1:0] below, grp;
      below = WIDTH'(1) << (group_lsb(g) - 1);
      grp   = ((WIDTH'(1) << group_width(g)) - 1) << group_lsb(g);
      apply(below | grp, below, 1'b0);
      apply(below, below, 1'b0);
    end

    // Random cases.
    for (int unsigned k = 0; k < NUM_RANDOM; k++)
      apply(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom));

    // Every mechanism must have happened.
    for (int g = 1; g < NUM_GROUPS; g++) begin
      $display("group %0d: excess-1 result chosen %0d times, Cin=0 result %0d times",
               g, sel1_cnt[g], sel0_cnt[g]);
      checks++;
      if (sel1_cnt[g] == 0 || sel0_cnt[g] == 0) begin
        failures++;
        $display("FAIL group %0d did not use both results", g);
      end
    end
    $display("carry out %0d times, carry through all groups %0d times",
             cout_cnt, full_ripple_cnt);
    checks++;
    if (cout_cnt == 0 || full_ripple_cnt == 0) begin
      failures++;
      $display("FAIL no carry out or no carry through every group");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(WATCHDOG);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
