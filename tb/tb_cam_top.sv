// tb_cam_top: end-to-end test of the CAM at its default size (4 words of
// 8 bits), with no parameter overridden.
//
// A reference model keeps the stored words, the argument and key registers
// and the match register, and predicts every output from the same inputs by
// its own rules: a word matches when ((word ~^ arg) | key) is all ones; a
// write changes only the addressed word; a search captures the matches of
// the contents before the edge. Each cycle the argument, key, write and
// search controls are drawn at random, with the argument often copied from
// a stored word so that matches are frequent. After every edge match_q,
// rd_data (for a random address), arg_q and key_q are compared.
//
// Each mechanism is counted, and a failure is counted for any that never
// occurs: write, hold of unaddressed words, exact match, mismatch, match
// made only by the key, several words matching at once, a write and a search
// in the same cycle whose match depends on the old contents, and reset in
// the middle of operation. The one-cycle search is checked directly: match_q
// reflects the search at the very next edge.
module tb_cam_top;
  import cam_pkg::*;
  localparam int unsigned WORDS = 4;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned AW    = 2;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             arg_load, key_load, wr_en, search;
  logic [WIDTH-1:0] arg_in, key_in, wr_data, rd_data, arg_q, key_q;
  logic [AW-1:0]    wr_addr, rd_addr;
  logic [WORDS-1:0] match_q;

  logic [WIDTH-1:0] ref_mem [WORDS];
  logic [WIDTH-1:0] ref_arg, ref_key;
  logic [WORDS-1:0] ref_match;

  int checks = 0, failures = 0;
  int n_write = 0, n_hold = 0, n_exact = 0, n_mismatch = 0, n_keyed = 0;
  int n_multi = 0, n_wr_search = 0, n_reset = 0;

  cam_top dut (
    .clk(clk), .rst_n(rst_n),
    .arg_load(arg_load), .arg_in(arg_in),
    .key_load(key_load), .key_in(key_in),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .search(search),
    .rd_addr(rd_addr), .rd_data(rd_data),
    .arg_q(arg_q), .key_q(key_q), .match_q(match_q)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic word_match(logic [WIDTH-1:0] w, logic [WIDTH-1:0] a, logic [WIDTH-1:0] k);
    return &((w ~^ a) | k);
  endfunction

  task automatic ref_reset();
    for (int w = 0; w < WORDS; w++) ref_mem[w] = '0;
    ref_arg   = '0;
    ref_key   = '0;
    ref_match = '0;
  endtask

  task automatic compare();
    checks++;
    if (match_q !== ref_match || arg_q !== ref_arg || key_q !== ref_key ||
        rd_data !== ref_mem[rd_addr]) begin
      failures++;
      $display("FAIL t=%0t match=%b/%b arg=%h/%h key=%h/%h rd[%0d]=%h/%h", $time,
               match_q, ref_match, arg_q, ref_arg, key_q, ref_key,
               rd_addr, rd_data, ref_mem[rd_addr]);
    end
  endtask

  // One random cycle: drive at the falling edge, update the model at the
  // rising edge, compare just after it.
  task automatic cycle();
    logic [WORDS-1:0] m_now;
    @(negedge clk);
    arg_load = ($urandom_range(2) == 0);
    arg_in   = ($urandom_range(2) != 0) ? ref_mem[$urandom_range(WORDS-1)] : WIDTH'($urandom);
    if ($urandom_range(3) == 0) arg_in ^= WIDTH'(1 << $urandom_range(WIDTH-1));
    key_load = ($urandom_range(3) == 0);
    case ($urandom_range(3))
      0:       key_in = '0;
      1:       key_in = WIDTH'(1 << $urandom_range(WIDTH-1));
      2:       key_in = WIDTH'($urandom);
      default: key_in = '1;
    endcase
    wr_en    = ($urandom_range(2) == 0);
    wr_addr  = AW'($urandom_range(WORDS-1));
    wr_data  = ($urandom_range(1) == 0) ? ref_arg : WIDTH'($urandom);
    search   = ($urandom_range(1) == 0);
    rd_addr  = AW'($urandom_range(WORDS-1));
    @(posedge clk);
    // Model, from the values before the edge.
    for (int w = 0; w < WORDS; w++) m_now[w] = word_match(ref_mem[w], ref_arg, ref_key);
    if (search) begin
      ref_match = m_now;
      for (int w = 0; w < WORDS; w++) begin
        if (m_now[w] && ref_key == '0) n_exact++;
        if (!m_now[w]) n_mismatch++;
        if (m_now[w] && !word_match(ref_mem[w], ref_arg, '0)) n_keyed++;
      end
      if ($countones(m_now) > 1) n_multi++;
      if (wr_en && m_now[wr_addr] != word_match(wr_data, ref_arg, ref_key)) n_wr_search++;
    end
    if (wr_en) begin
      ref_mem[wr_addr] = wr_data;
      n_write++;
      n_hold += WORDS - 1;
    end
    if (arg_load) ref_arg = arg_in;
    if (key_load) ref_key = key_in;
    #1 compare();
  endtask

  // Directed one-cycle search: write a word, load the argument, then one
  // search strobe must show the match at the very next edge.
  task automatic directed_latency();
    @(negedge clk);
    {arg_load, key_load, wr_en, search} = '0;
    wr_en = 1'b1; wr_addr = AW'(WORDS - 1); wr_data = 8'h5A;
    arg_load = 1'b1; arg_in = 8'h5A;
    key_load = 1'b1; key_in = '0;
    rd_addr = AW'(WORDS - 1);
    @(posedge clk);
    ref_mem[WORDS-1] = 8'h5A; ref_arg = 8'h5A; ref_key = '0;
    #1 compare();
    @(negedge clk);
    {arg_load, key_load, wr_en} = '0;
    search = 1'b1;
    @(posedge clk);
    for (int w = 0; w < WORDS; w++) ref_match[w] = word_match(ref_mem[w], ref_arg, ref_key);
    #1 compare();
    checks++;
    if (!match_q[WORDS-1]) begin
      failures++;
      $display("FAIL: search result not in match register one edge after the strobe");
    end
    @(negedge clk);
    search = 1'b0;
  endtask

  initial begin
    {arg_load, key_load, wr_en, search} = '0;
    arg_in = '0; key_in = '0; wr_data = '0; wr_addr = '0; rd_addr = '0;
    ref_reset();
    #12;
    compare();
    rst_n = 1'b1;
    directed_latency();
    for (int n = 0; n < 3000; n++) begin
      cycle();
      if (n == 1500) begin
        // Asynchronous reset in the middle of operation.
        @(negedge clk);
        {arg_load, key_load, wr_en, search} = '0;
        rst_n = 1'b0;
        #2;
        ref_reset();
        for (int a = 0; a < WORDS; a++) begin
          rd_addr = AW'(a);
          #1 compare();
        end
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("writes=%0d holds=%0d exact=%0d mismatch=%0d keyed=%0d multi=%0d write_and_search=%0d resets=%0d",
             n_write, n_hold, n_exact, n_mismatch, n_keyed, n_multi, n_wr_search, n_reset);
    if (n_write == 0)     begin failures++; $display("FAIL: no write");              end
    if (n_hold == 0)      begin failures++; $display("FAIL: no hold");               end
    if (n_exact == 0)     begin failures++; $display("FAIL: no exact match");        end
    if (n_mismatch == 0)  begin failures++; $display("FAIL: no mismatch");           end
    if (n_keyed == 0)     begin failures++; $display("FAIL: no key-made match");     end
    if (n_multi == 0)     begin failures++; $display("FAIL: no multi-word match");   end
    if (n_wr_search == 0) begin failures++; $display("FAIL: no write during search"); end
    if (n_reset == 0)     begin failures++; $display("FAIL: no reset");             end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
