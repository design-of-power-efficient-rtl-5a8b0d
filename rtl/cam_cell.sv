// cam_cell: the two-multiplexer content-addressable memory cell.
//
// The cell stores one bit F and compares it with a search argument bit A.
// Its memory part (cam_mem) writes the input I into F while R/W is 0 and
// keeps F while R/W is 1. Its matching part (cam_match) drives M high when
// A equals F, or unconditionally when the key bit K is 1.
//
// Timing: a write presented in one cycle is stored at the next rising clock
// edge; M is a combinational function of the stored F and of the current A
// and K, so it reflects a write one edge after the write was presented.
// Interface: clk, rst_n (asynchronous, active low, clears F), rw, i, a, k in;
// f (stored bit, the read output) and m (match) out.
//
// The cell's logic, the R/W polarity and the key semantics follow the cell's
// definition. The two published layouts (corner inverter and robust inverter)
// differ only in their QCA geometry and share this logic; the clock edge
// and the reset stand in for the QCA clock zones and are this design's own.
module cam_cell
  import cam_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  rw_e  rw,
  input  logic i,
  input  logic a,
  input  logic k,
  output logic f,
  output logic m
);

  cam_mem u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .rw    (rw),
    .i     (i),
    .f     (f)
  );

  cam_match u_match (
    .f (f),
    .a (a),
    .k (k),
    .m (m)
  );

endmodule
