// cam_top: a content-addressable memory built from the two-multiplexer cell.
//
// The organisation is the classic one: an argument register A holds the word
// searched for, a key register K marks the bits to ignore (a 1 in K makes that
// bit match whatever is stored), an array of WORDS words of WIDTH cells holds
// the data, and a match register records which words matched. A search takes
// one clock: with search high at a rising edge, the match register captures,
// for every word at once, whether all its unmasked bits equal the argument.
//
// Interface (all synchronous to clk, rst_n asynchronous active low):
//   arg_load/arg_in   load the argument register at the next edge
//   key_load/key_in   load the key register at the next edge
//   wr_en/wr_addr/wr_data
//                     write wr_data into word wr_addr at the next edge: that
//                     word's R/W line is driven to write, every other word's
//                     stays at read, so their contents are untouched
//   search            capture the array's match lines into match_q
//   rd_addr/rd_data   read port: the stored bits (F) of word rd_addr,
//                     combinational
//   match_q           one bit per word, registered
//   arg_q, key_q      the two search registers, for observation
// A write and a search in the same cycle compare against the contents before
// the write. Reset clears the array and all three registers.
//
// The registers, the array and the cell follow the document's organisation;
// their sizes, the per-word write decoding, the read port and the load and
// search strobes are this design's choices, since the organisation gives
// them no numbers and no control signals beyond Input and Read/Write.
module cam_top
  import cam_pkg::*;
#(
  parameter int unsigned WORDS = 4,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             arg_load,
  input  logic [WIDTH-1:0] arg_in,
  input  logic             key_load,
  input  logic [WIDTH-1:0] key_in,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             search,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  output logic [WIDTH-1:0] arg_q,
  output logic [WIDTH-1:0] key_q,
  output logic [WORDS-1:0] match_q
);

  rw_e              word_rw     [WORDS];
  logic [WIDTH-1:0] word_stored [WORDS];
  logic [WORDS-1:0] word_match;

  // Argument and key registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arg_q <= '0;
      key_q <= '0;
    end else begin
      if (arg_load) arg_q <= arg_in;
      if (key_load) key_q <= key_in;
    end
  end

  // Per-word R/W lines: only the addressed word sees a write.
  always_comb begin
    for (int w = 0; w < WORDS; w++) begin
      word_rw[w] = (wr_en && wr_addr == AW'(w)) ? RW_WRITE : RW_READ;
    end
  end

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    cam_word #(.WIDTH(WIDTH)) u_word (
      .clk    (clk),
      .rst_n  (rst_n),
      .rw     (word_rw[w]),
      .data   (wr_data),
      .arg    (arg_q),
      .key    (key_q),
      .stored (word_stored[w]),
      .match  (word_match[w])
    );
  end

  // Match register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      match_q <= '0;
    else if (search) match_q <= word_match;
  end

  always_comb begin
    rd_data = '0;
    for (int w = 0; w < WORDS; w++) begin
      if (rd_addr == AW'(w)) rd_data = word_stored[w];
    end
  end

  // A write must name a word that exists.
  a_wr_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                       wr_en |-> 32'(wr_addr) < WORDS);

endmodule
