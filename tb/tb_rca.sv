// tb_rca: self-checking test of the ripple carry adder with carry input.
//
// Exhaustive over a, b and cin for the default 2-bit adder (the least
// significant group of the 16-bit adder) and for a 5-bit one; {cout, sum} is
// compared with a + b + cin computed arithmetically. Combinational: one input
// per time step, with a watchdog that fails the run after WATCHDOG steps.
module tb_rca;

  localparam int unsigned WATCHDOG = 10000;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [1:0] a2, b2, s2;
  logic       ci2, co2;
  logic [4:0] a5, b5, s5;
  logic       ci5, co5;

  rca u_dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  rca #(.N(5)) u_dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          a2 = 2'(i); b2 = 2'(j); ci2 = 1'(c);
          #1;
          checks++;
          if ({co2, s2} !== 3'(i + j + c)) begin
            failures++;
            $display("FAIL rca2 %0d+%0d+%0d = %0d", i, j, c, {co2, s2});
          end
        end
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) begin
          a5 = 5'(i); b5 = 5'(j); ci5 = 1'(c);
          #1;
          checks++;
          if ({co5, s5} !== 6'(i + j + c)) begin
            failures++;
            $display("FAIL rca5 %0d+%0d+%0d = %0d", i, j, c, {co5, s5});
          end
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
