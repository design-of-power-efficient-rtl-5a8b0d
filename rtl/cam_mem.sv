// cam_mem: memory part of the CAM cell, one stored bit F.
//
// Next state: F* = I & ~RW | F & RW. A 2:1 multiplexer selected by R/W
// chooses between the input bit I (R/W = 0, write) and the fed-back stored
// bit F (R/W = 1, read: no change). In the QCA layout the loop is closed by
// the clock zones themselves; here it is closed by a flip-flop, so a write
// shows on f one clock edge after it is presented and holds from then on.
//
// Interface: clk, asynchronous active-low rst_n (clears F to 0), rw, i in;
// f out. The multiplexer structure and the R/W polarity follow the cell's
// definition; the flip-flop and the reset are this design's choices, since a
// QCA cell has neither a synchronous clock edge nor a reset line.
module cam_mem
  import cam_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  rw_e  rw,
  input  logic i,
  output logic f
);

  logic f_next;

  // S=1 input: the stored bit fed back; S=0 input: the data input.
  mux2 u_store_mux (
    .sel (rw),
    .in0 (i),
    .in1 (f),
    .y   (f_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f <= 1'b0;
    else        f <= f_next;
  end

endmodule
