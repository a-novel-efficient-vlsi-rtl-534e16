// tb_csa_bec_group: self-checking test of one carry-select group with a
// binary to excess-1 converter.
//
// Exhaustive over a, b and the select carry for the default 2-bit group and
// for the 5-bit group (bits 15:11 of the 16-bit adder). {cout, sum} must
// equal a + b + sel, computed arithmetically. Also counts how often each
// group took the excess-1 path (sel = 1) and produced a carry out, and fails
// if either never happened. Combinational: one input per time step, with a
// watchdog.
module tb_csa_bec_group;

  localparam int unsigned WATCHDOG = 10000;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned bec_path = 0;
  int unsigned carries  = 0;

  logic [1:0] a2, b2, s2;
  logic       sel2, co2;
  logic [4:0] a5, b5, s5;
  logic       sel5, co5;

  csa_bec_group u_dut2 (.a(a2), .b(b2), .sel(sel2), .sum(s2), .cout(co2));
  csa_bec_group #(.N(5)) u_dut5 (.a(a5), .b(b5), .sel(sel5), .sum(s5), .cout(co5));

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          a2 = 2'(i); b2 = 2'(j); sel2 = 1'(c);
          #1;
          checks++;
          if ({co2, s2} !== 3'(i + j + c)) begin
            failures++;
            $display("FAIL group2 %0d+%0d+%0d = %0d", i, j, c, {co2, s2});
          end
          if (c != 0) bec_path++;
          if (co2) carries++;
        end
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) begin
          a5 = 5'(i); b5 = 5'(j); sel5 = 1'(c);
          #1;
          checks++;
          if ({co5, s5} !== 6'(i + j + c)) begin
            failures++;
            $display("FAIL group5 %0d+%0d+%0d = %0d", i, j, c, {co5, s5});
          end
          if (c != 0) bec_path++;
          if (co5) carries++;
        end
    $display("excess-1 path taken %0d times, carry out %0d times", bec_path, carries);
    checks++;
    if (bec_path == 0 || carries == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
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
