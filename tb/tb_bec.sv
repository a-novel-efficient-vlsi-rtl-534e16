// tb_bec: self-checking test of the binary to excess-1 converter.
//
// Runs every input of the 3-bit converter (the default size) and of a 6-bit
// one (the largest size the 16-bit adder uses) and compares x with b + 1
// computed arithmetically, modulo 2^N. The four rows of the published 3-bit
// truth table (000->001, 001->010, 010->011, 111->000) are also checked as
// literal values. Combinational: one input per time step. A watchdog ends the
// run with a failure if it has not finished after WATCHDOG steps.
module tb_bec;

  localparam int unsigned WATCHDOG = 1000;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [2:0] b3, x3;
  logic [5:0] b6, x6;

  bec u_dut3 (.b(b3), .x(x3));
  bec #(.N(6)) u_dut6 (.b(b6), .x(x6));

  task automatic check3(input logic [2:0] in, input logic [2:0] exp);
    b3 = in;
    #1;
    checks++;
    if (x3 !== exp) begin
      failures++;
      $display("FAIL bec3 b=%b x=%b expected %b", in, x3, exp);
    end
  endtask

  initial begin
    // Published truth table rows.
    check3(3'b000, 3'b001);
    check3(3'b001, 3'b010);
    check3(3'b010, 3'b011);
    check3(3'b111, 3'b000);
    // All inputs, both sizes.
    for (int i = 0; i < 8; i++) check3(3'(i), 3'(i + 1));
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i);
      #1;
      checks++;
      if (x6 !== 6'(i + 1)) begin
        failures++;
        $display("FAIL bec6 b=%b x=%b expected %b", b6, x6, 6'(i + 1));
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
