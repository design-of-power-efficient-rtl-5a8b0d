// tb_cam_word: checks one CAM word at its default width of 8 bits. Random writes, holds and
// searches are applied; a reference word is kept and the expected match is
// computed as "every bit either keyed off or equal to the argument", i.e.
// ((stored ~^ arg) | key) == all ones. Directed cases cover an exact match,
// a single-bit mismatch, and an all-ones key that must match anything.
module tb_cam_word;
  import cam_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  rw_e  rw;
  logic [W-1:0] data, arg, key, stored;
  logic match;
  logic [W-1:0] ref_w;
  int checks = 0, failures = 0;

  cam_word dut (.clk(clk), .rst_n(rst_n), .rw(rw), .data(data),
                             .arg(arg), .key(key), .stored(stored), .match(match));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic exp;
    exp = &((ref_w ~^ arg) | key);
    checks++;
    if (stored !== ref_w || match !== exp) begin
      failures++;
      $display("FAIL stored=%h/%h arg=%h key=%h match=%0b/%0b", stored, ref_w, arg, key, match, exp);
    end
  endtask

  task automatic step(input rw_e r, input logic [W-1:0] d, input logic [W-1:0] aa, input logic [W-1:0] kk);
    @(negedge clk);
    rw = r; data = d; arg = aa; key = kk;
    #1 check();
    @(posedge clk);
    if (r == RW_WRITE) ref_w = d;
    #1 check();
  endtask

  initial begin
    rw = RW_READ; data = '0; arg = '0; key = '0;
    #12;
    ref_w = '0;
    check();
    rst_n = 1'b1;
    step(RW_WRITE, 8'hA5, 8'h00, 8'h00);
    step(RW_READ,  8'h3C, 8'hA5, 8'h00);   // exact match, data ignored
    step(RW_READ,  8'h00, 8'hA4, 8'h00);   // one bit differs
    step(RW_READ,  8'h00, 8'hA4, 8'h01);   // that bit keyed off
    step(RW_READ,  8'h00, 8'h5A, 8'hFF);   // all keyed off
    for (int n = 0; n < 600; n++) begin
      logic [W-1:0] aa;
      aa = ($urandom_range(3) == 0) ? ref_w ^ W'(1 << $urandom_range(W-1)) : W'($urandom);
      if ($urandom_range(1)) aa = ref_w;
      step($urandom_range(3) == 0 ? RW_WRITE : RW_READ, W'($urandom), aa,
           ($urandom_range(2) == 0) ? W'($urandom) : '0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
