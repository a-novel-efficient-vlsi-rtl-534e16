// tb_cy_mux: self-checking test of the carry multiplexer.
//
// The default 6:3 mux (N = 2) is run over every pair of 3-bit inputs and both
// select values; a 12:6 mux (N = 5, the widest group) gets 2000 random input
// pairs with both select values. The expected output is in1 when sel is 1 and
// in0 when it is 0. Combinational: one input per time step, with a watchdog.
module tb_cy_mux;

  localparam int unsigned WATCHDOG = 20000;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  logic [2:0] i0_3, i1_3, o3;
  logic       s3;
  logic [5:0] i0_6, i1_6, o6;
  logic       s6;

  cy_mux u_dut2 (.in0(i0_3), .in1(i1_3), .sel(s3), .out(o3));
  cy_mux #(.N(5)) u_dut5 (.in0(i0_6), .in1(i1_6), .sel(s6), .out(o6));

  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          i0_3 = 3'(i); i1_3 = 3'(j); s3 = 1'(s);
          #1;
          checks++;
          if (o3 !== (s != 0 ? 3'(j) : 3'(i))) begin
            failures++;
            $display("FAIL mux6:3 in0=%b in1=%b sel=%0d out=%b", i0_3, i1_3, s, o3);
          end
        end
    for (int k = 0; k < 2000; k++) begin
      i0_6 = 6'($urandom); i1_6 = 6'($urandom); s6 = 1'(k);
      #1;
      checks++;
      if (o6 !== (s6 ? i1_6 : i0_6)) begin
        failures++;
        $display("FAIL mux12:6 in0=%b in1=%b sel=%0d out=%b", i0_6, i1_6, s6, o6);
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
