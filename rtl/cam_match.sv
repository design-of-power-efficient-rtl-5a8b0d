// cam_match: matching part of the CAM cell.
//
// M = K | ~K & (A & F | ~A & ~F). A 2:1 multiplexer selected by the search
// argument A passes the stored bit F when A is 1 and its inverse when A is 0,
// so its output is 1 exactly when A equals F. An OR gate with the key bit K
// then forces the match: K = 1 makes the bit a "don't care", K = 0 lets the
// comparison through. Purely combinational.
//
// Interface: f (stored bit), a (argument), k (key) in; m (match) out. The
// structure (one multiplexer, one inverter, one OR gate) is the cell's own.
module cam_match (
  input  logic f,
  input  logic a,
  input  logic k,
  output logic m
);

  logic f_n;
  logic eq;

  always_comb f_n = ~f;

  // S=1 input: F; S=0 input: the inverted F.
  mux2 u_cmp_mux (
    .sel (a),
    .in0 (f_n),
    .in1 (f),
    .y   (eq)
  );

  always_comb m = k | eq;

endmodule
