// tb_rca_cin0: self-checking test of the ripple carry adder whose carry input is 0.
//
// Exhaustive over a and b for the default 2-bit adder (the Cin=0 adder
// of the 2-bit group) and for a 5-bit one; {cout, sum} is
// compared with a + b computed arithmetically. Combinational: one input
// per time step, with a watchdog that fails the run after WATCHDOG steps.
module tb_rca_cin0;

  localparam int unsigned WATCHDOG = 10000;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [1:0] a2, b2, s2;
  logic       co2;
  logic [4:0] a5, b5, s5;
  logic       co5;

  rca_cin0 u_dut2 (.a(a2), .b(b2), .sum(s2), .cout(co2));
  rca_cin0 #(.N(5)) u_dut5 (.a(a5), .b(b5), .sum(s5), .cout(co5));

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j);
        #1;
        checks++;
        if ({co2, s2} !== 3'(i + j)) begin
          failures++;
          $display("FAIL rca2 %0d+%0d = %0d", i, j, {co2, s2});
        end
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i); b5 = 5'(j);
        #1;
        checks++;
        if ({co5, s5} !== 6'(i + j)) begin
          failures++;
          $display("FAIL rca5 %0d+%0d = %0d", i, j, {co5, s5});
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
