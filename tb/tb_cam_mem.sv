// tb_cam_mem: checks the memory part of the CAM cell against its function
// table: R/W = 0 stores I at the next rising edge, R/W = 1 keeps F. The four
// table rows are applied first in a fixed order, then 400 random cycles.
// The reference bit is updated from the table, not from the next-state
// equation, and F is compared one time step after each edge (one-edge write
// latency). Reset is checked to clear F.
module tb_cam_mem;
  import cam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  rw_e  rw;
  logic i, f;
  logic ref_f;
  int checks = 0, failures = 0;

  cam_mem dut (.clk(clk), .rst_n(rst_n), .rw(rw), .i(i), .f(f));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input rw_e r, input logic d);
    @(negedge clk);
    rw = r;
    i  = d;
    // F must not change before the edge.
    #1;
    checks++;
    if (f !== ref_f) begin
      failures++;
      $display("FAIL before edge: f=%0b expected %0b", f, ref_f);
    end
    @(posedge clk);
    if (r == RW_WRITE) ref_f = d;  // Write rows of the table
    #1;
    checks++;
    if (f !== ref_f) begin
      failures++;
      $display("FAIL rw=%0d i=%0b: f=%0b expected %0b", r, d, f, ref_f);
    end
  endtask

  initial begin
    rw = RW_READ;
    i  = 1'b0;
    #12;
    checks++;
    if (f !== 1'b0) begin
      failures++;
      $display("FAIL reset: f=%0b", f);
    end
    ref_f = 1'b0;
    rst_n = 1'b1;
    // Table rows: write 1, read (F=1), write 0, read (F=0), with the
    // don't-care input set against the stored value on the read rows.
    step(RW_WRITE, 1'b1);
    step(RW_READ,  1'b0);
    step(RW_WRITE, 1'b0);
    step(RW_READ,  1'b1);
    for (int n = 0; n < 400; n++) begin
      step($urandom_range(1) ? RW_READ : RW_WRITE, 1'($urandom_range(1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
