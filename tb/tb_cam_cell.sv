// tb_cam_cell: checks the complete CAM cell, memory part and matching part
// together. A 4-bit counter drives {K, R/W, I, A}, so all sixteen input
// combinations occur, each from both stored values, over 64 cycles; then 500
// random cycles follow. A reference bit is kept from the memory function
// table and the expected match from the match table. F and M are checked
// just before each rising edge (the old F must still be there) and just
// after it (a write must show, in F and in M, one edge after it was
// presented, not earlier and not later).
module tb_cam_cell;
  import cam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  rw_e  rw;
  logic i, a, k, f, m;
  logic ref_f;
  int checks = 0, failures = 0;
  int writes = 0, holds = 0, masked = 0, mismatches = 0;

  cam_cell dut (.clk(clk), .rst_n(rst_n), .rw(rw), .i(i), .a(a), .k(k), .f(f), .m(m));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic exp_match(logic kk, logic aa, logic ff);
    if (kk) return 1'b1;           // key set: forced match
    return (aa == ff);             // key clear: compare
  endfunction

  task automatic check(input string when);
    checks++;
    if (f !== ref_f || m !== exp_match(k, a, ref_f)) begin
      failures++;
      $display("FAIL %s: K=%0b RW=%0d I=%0b A=%0b F=%0b/%0b M=%0b/%0b", when,
               k, rw, i, a, f, ref_f, m, exp_match(k, a, ref_f));
    end
  endtask

  task automatic step(input logic kk, input rw_e r, input logic ii, input logic aa);
    @(negedge clk);
    k = kk; rw = r; i = ii; a = aa;
    #1 check("before edge");
    if (!kk && aa != ref_f) mismatches++;
    if (kk && aa != ref_f) masked++;
    @(posedge clk);
    if (r == RW_WRITE) begin
      ref_f = ii;
      writes++;
    end else begin
      holds++;
    end
    #1 check("after edge");
  endtask

  initial begin
    k = 0; rw = RW_READ; i = 0; a = 0;
    #12;
    ref_f = 1'b0;
    check("reset");
    rst_n = 1'b1;
    for (int n = 0; n < 64; n++) begin
      logic [3:0] c;
      c = 4'(n);
      step(c[3], c[2] ? RW_READ : RW_WRITE, c[1], c[0]);
    end
    for (int n = 0; n < 500; n++) begin
      step(1'($urandom_range(1)), $urandom_range(1) ? RW_READ : RW_WRITE,
           1'($urandom_range(1)), 1'($urandom_range(1)));
    end
    $display("writes=%0d holds=%0d masked=%0d mismatches=%0d", writes, holds, masked, mismatches);
    if (writes == 0 || holds == 0 || masked == 0 || mismatches == 0) begin
      failures++;
      $display("FAIL: a cell operation never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
