// sorter_tile_tb: checks the block sorter.
//
// Part 1 uses a 2-column sorter with block size 8 and the worked example of a
// two-column sort: two blocks of eight tuples, sorted on the first column and
// then on the second. Part 2 uses the full 4-column, 32-tuple sorter on random
// tuples drawn from a small value range, so that ties on the first columns
// are frequent and the lower rows must decide; a stream of 75 tuples gives
// two full blocks and a partial one. Every block of the output must equal the
// same block sorted here (ascending, column 1 first). Both parts run under
// random gaps and back pressure.
module sorter_tile_tb;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // 2 x 8 sorter
  logic  [1:0] a_in_valid, a_in_ready, a_out_valid, a_out_ready;
  flit_t [1:0] a_in_flit, a_out_flit;
  for (genvar i = 0; i < 2; i++) begin : g_a
    st_source src (.clk, .rst_n, .valid(a_in_valid[i]), .flit(a_in_flit[i]), .ready(a_in_ready[i]));
    st_sink   snk (.clk, .rst_n, .valid(a_out_valid[i]), .flit(a_out_flit[i]), .ready(a_out_ready[i]));
  end
  sorter_tile #(.NCOLS(2), .K(8)) dut_small (
    .clk, .rst_n, .in_valid(a_in_valid), .in_flit(a_in_flit), .in_ready(a_in_ready),
    .out_valid(a_out_valid), .out_flit(a_out_flit), .out_ready(a_out_ready));

  // 4 x 32 sorter, default size
  logic  [3:0] b_in_valid, b_in_ready, b_out_valid, b_out_ready;
  flit_t [3:0] b_in_flit, b_out_flit;
  for (genvar i = 0; i < 4; i++) begin : g_b
    st_source src (.clk, .rst_n, .valid(b_in_valid[i]), .flit(b_in_flit[i]), .ready(b_in_ready[i]));
    st_sink   snk (.clk, .rst_n, .valid(b_out_valid[i]), .flit(b_out_flit[i]), .ready(b_out_ready[i]));
  end
  sorter_tile dut (
    .clk, .rst_n, .in_valid(b_in_valid), .in_flit(b_in_flit), .in_ready(b_in_ready),
    .out_valid(b_out_valid), .out_flit(b_out_flit), .out_ready(b_out_ready));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [127:0] tuple_t;   // four columns, column 1 in the top bits
  word_t c1[$], c2[$], got[$], gc[4][$], bc[4][$];
  tuple_t tup[$], blk[$], exp[$];
  int ties = 0;

  // signed lexicographic key: flip each column's sign bit
  function automatic tuple_t key(tuple_t t);
    return t ^ {4{1'b1, 31'b0}};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // part 1: worked example, block size 8
    c1 = {6, 5, 3, 1, 8, 12, 1, 45, 5, 8, 7, 3, 3, 2, 10, 14};
    c2 = {1, 1, 1, 3, 2, 2, 2, 2, 1, 2, 3, 9, 8, 6, 7, 8};
    g_a[0].src.push_col(c1, 1);
    g_a[1].src.push_col(c2, 1);
    while (!(g_a[0].snk.ended() && g_a[1].snk.ended())) @(posedge clk);
    g_a[0].snk.words(got);
    c1 = {1, 1, 3, 5, 6, 8, 12, 45, 2, 3, 3, 5, 7, 8, 10, 14};
    check(got == c1, "example column 1");
    g_a[1].snk.words(got);
    c2 = {2, 3, 1, 1, 1, 2, 2, 2, 6, 8, 9, 1, 3, 2, 7, 8};
    check(got == c2, "example column 2");
    check(g_a[0].snk.got.size() == 17, "example terminator last");

    // part 2: random tuples, default 4 x 32 sorter
    for (int c = 0; c < 4; c++) bc[c] = {};
    tup = {};
    for (int i = 0; i < 75; i++) begin
      tuple_t t;
      for (int c = 0; c < 4; c++) begin
        automatic word_t v = word_t'(int'($urandom_range(6)) - 3);
        bc[c].push_back(v);
        t[127-32*c -: 32] = v;
      end
      tup.push_back(t);
    end
    g_b[0].src.push_col(bc[0], 1);
    g_b[1].src.push_col(bc[1], 1);
    g_b[2].src.push_col(bc[2], 1);
    g_b[3].src.push_col(bc[3], 1);
    // reference: sort each block of 32
    exp = {};
    for (int s = 0; s < 75; s += 32) begin
      blk = {};
      for (int i = s; i < s + 32 && i < 75; i++) blk.push_back(key(tup[i]));
      blk.sort();
      for (int i = 1; i < blk.size(); i++) if (blk[i][127:96] == blk[i-1][127:96]) ties++;
      foreach (blk[i]) exp.push_back(key(blk[i]));
    end
    while (!(g_b[0].snk.ended() && g_b[1].snk.ended() && g_b[2].snk.ended()
             && g_b[3].snk.ended())) @(posedge clk);
    g_b[0].snk.words(gc[0]);
    g_b[1].snk.words(gc[1]);
    g_b[2].snk.words(gc[2]);
    g_b[3].snk.words(gc[3]);
    check(gc[0].size() == 75, "75 tuples out");
    for (int i = 0; i < 75 && i < gc[0].size(); i++) begin
      automatic tuple_t t = {gc[0][i], gc[1][i], gc[2][i], gc[3][i]};
      check(t == exp[i], $sformatf("tuple %0d", i));
    end
    check(ties > 10, "ties on column 1 exercised");
    check(g_b[0].snk.violations == 0 && g_a[0].snk.violations == 0, "ready latency 1 respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
