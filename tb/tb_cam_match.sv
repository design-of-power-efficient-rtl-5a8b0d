// tb_cam_match: checks the matching part of the CAM cell.
// The five rows of the match table are applied literally (the K = 1 row for
// all four A, F pairs), then all eight combinations are compared with the
// match equation M = K | ~K & (A & F | ~A & ~F).
module tb_cam_match;
  logic f, a, k, m;
  int checks = 0, failures = 0;

  cam_match dut (.f(f), .a(a), .k(k), .m(m));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic row(input logic kk, input logic aa, input logic ff, input logic exp_m);
    k = kk; a = aa; f = ff;
    #1;
    checks++;
    if (m !== exp_m) begin
      failures++;
      $display("FAIL K=%0b A=%0b F=%0b: M=%0b expected %0b", kk, aa, ff, m, exp_m);
    end
  endtask

  initial begin
    // Match table: K A F -> M
    row(1, 0, 0, 1);
    row(1, 0, 1, 1);
    row(1, 1, 0, 1);
    row(1, 1, 1, 1);
    row(0, 0, 1, 0);
    row(0, 0, 0, 1);
    row(0, 1, 1, 1);
    row(0, 1, 0, 0);
    // Equation form.
    for (int v = 0; v < 8; v++) begin
      logic kk, aa, ff;
      {kk, aa, ff} = 3'(v);
      row(kk, aa, ff, kk | (~kk & ((aa & ff) | (~aa & ~ff))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
