// cam_word: one word of the associative array, WIDTH CAM cells side by side.
//
// All cells of a word share the word's R/W line, so a write (rw = RW_WRITE)
// stores the whole data word at the next clock edge. Each cell compares its
// stored bit with its own argument bit under its own key bit; the word
// matches when every cell does, so match is the AND of the cells' M outputs.
// With every key bit set the word matches whatever it holds.
//
// Interface: clk, rst_n, rw (this word's R/W line), data (input I of each
// cell), arg (A of each cell), key (K of each cell) in; stored (F of each
// cell) and match out. match is combinational from the stored bits.
// Using the cell unchanged follows the document's organisation; the AND that
// combines the cells of a word is this design's choice, as the combining
// logic is not drawn.
module cam_word
  import cam_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rw_e              rw,
  input  logic [WIDTH-1:0] data,
  input  logic [WIDTH-1:0] arg,
  input  logic [WIDTH-1:0] key,
  output logic [WIDTH-1:0] stored,
  output logic             match
);

  logic [WIDTH-1:0] cell_m;

  for (genvar b = 0; b < WIDTH; b++) begin : g_cell
    cam_cell u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .rw    (rw),
      .i     (data[b]),
      .a     (arg[b]),
      .k     (key[b]),
      .f     (stored[b]),
      .m     (cell_m[b])
    );
  end

  always_comb match = &cell_m;

endmodule
