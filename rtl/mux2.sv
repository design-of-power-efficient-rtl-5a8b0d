// mux2: one-bit 2:1 multiplexer, the building block of the CAM cell.
//
// y follows in1 when sel is 1 and in0 when sel is 0, the S=1 and S=0 inputs
// of the cell's block diagram. The cell uses two of them: one as the storage
// loop of the memory part, selected by R/W, and one as the comparator of the
// matching part, selected by the search argument. Purely combinational, no
// clock. The original is a QCA layout of majority gates; only its logic
// function is kept here.
module mux2 (
  input  logic sel,
  input  logic in0,
  input  logic in1,
  output logic y
);

  always_comb y = sel ? in1 : in0;

endmodule
