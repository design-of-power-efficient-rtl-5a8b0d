// tb_mux2: exhaustive check of the 2:1 multiplexer.
// All eight input combinations are applied; the expected output is the
// sum-of-products form sel&in1 | ~sel&in0, worked out here independently.
module tb_mux2;
  logic sel, in0, in1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel(sel), .in0(in0), .in1(in1), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #1;
      checks++;
      if (y !== ((sel & in1) | (~sel & in0))) begin
        failures++;
        $display("FAIL sel=%0b in1=%0b in0=%0b y=%0b", sel, in1, in0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
