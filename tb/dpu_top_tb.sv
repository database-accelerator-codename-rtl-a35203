// dpu_top_tb: runs a complete query through the processing unit.
//
// The query computes, for every order, the revenue of its line items whose
// discount is above 10 percent:
//   select o.orderkey, sum(l.extendedprice * (100 - l.discount) / 100)
//   from lineitem l, orders o
//   where l.discount > 10 and o.orderkey = l.orderkey group by o.orderkey
// (prices in integer units, discounts in percent, so that the 32-bit integer
// tiles can run it). The testbench plays the host: it streams columns into
// tile inputs, collects tile outputs and feeds them to the next tile, and
// merges the sorter's 32-tuple runs, following the query plan
//   boolgen(discount > 10, constant operand) -> colfilter x3 -> sorter on
//   l.orderkey -> merge of runs -> joiner(orders.orderkey, l.orderkey,
//   price, discount) -> ALU (100 - discount) -> ALU (* price) -> ALU (/ 100,
//   constant operand) -> aggregator NOP (order keys) and SUM (revenue).
// All links run with random gaps and random back pressure. The final order
// keys and revenues are compared with the query evaluated directly here.
// The mechanisms of the design are counted and each must occur: input buffer
// stalls (in_ready low), end-of-stream terminators, runtime reconfiguration,
// constant-operand mode, dropped filter elements, several sorter blocks, ties
// on the sort key, join rows without partner, and group boundaries.
// dpu_top runs with its default parameters (4 x 32 sorter, 4-column joiner).
module dpu_top_tb;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_write = 0;
  logic [4:0] cfg_addr = 0;
  word_t cfg_wdata = 0;

  logic  [1:0] bg_in_valid, bg_in_ready, cf_in_valid, cf_in_ready;
  logic  [1:0] alu_in_valid, alu_in_ready, ag_in_valid, ag_in_ready;
  flit_t [1:0] bg_in_flit, cf_in_flit, alu_in_flit, ag_in_flit;
  logic  bg_out_valid, bg_out_ready, cf_out_valid, cf_out_ready;
  logic  alu_out_valid, alu_out_ready, ag_out_valid, ag_out_ready;
  flit_t bg_out_flit, cf_out_flit, alu_out_flit, ag_out_flit;
  logic  [3:0] so_in_valid, so_in_ready, so_out_valid, so_out_ready;
  logic  [3:0] jn_in_valid, jn_in_ready, jn_out_valid, jn_out_ready;
  flit_t [3:0] so_in_flit, so_out_flit, jn_in_flit, jn_out_flit;

  dpu_top dut (.*);

  // host-side stream endpoints
  for (genvar i = 0; i < 2; i++) begin : g2
    st_source bg (.clk, .rst_n, .valid(bg_in_valid[i]), .flit(bg_in_flit[i]), .ready(bg_in_ready[i]));
    st_source cf (.clk, .rst_n, .valid(cf_in_valid[i]), .flit(cf_in_flit[i]), .ready(cf_in_ready[i]));
    st_source al (.clk, .rst_n, .valid(alu_in_valid[i]), .flit(alu_in_flit[i]), .ready(alu_in_ready[i]));
    st_source ag (.clk, .rst_n, .valid(ag_in_valid[i]), .flit(ag_in_flit[i]), .ready(ag_in_ready[i]));
  end
  for (genvar i = 0; i < 4; i++) begin : g4
    st_source so_src (.clk, .rst_n, .valid(so_in_valid[i]), .flit(so_in_flit[i]), .ready(so_in_ready[i]));
    st_sink   so_snk (.clk, .rst_n, .valid(so_out_valid[i]), .flit(so_out_flit[i]), .ready(so_out_ready[i]));
    st_source jn_src (.clk, .rst_n, .valid(jn_in_valid[i]), .flit(jn_in_flit[i]), .ready(jn_in_ready[i]));
    st_sink   jn_snk (.clk, .rst_n, .valid(jn_out_valid[i]), .flit(jn_out_flit[i]), .ready(jn_out_ready[i]));
  end
  st_sink bg_snk (.clk, .rst_n, .valid(bg_out_valid), .flit(bg_out_flit), .ready(bg_out_ready));
  st_sink cf_snk (.clk, .rst_n, .valid(cf_out_valid), .flit(cf_out_flit), .ready(cf_out_ready));
  st_sink al_snk (.clk, .rst_n, .valid(alu_out_valid), .flit(alu_out_flit), .ready(alu_out_ready));
  st_sink ag_snk (.clk, .rst_n, .valid(ag_out_valid), .flit(ag_out_flit), .ready(ag_out_ready));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_stall = 0, n_term = 0, n_reconf = 0, n_const = 0, n_drop = 0;
  int n_blocks = 0, n_ties = 0, n_unmatched = 0, n_groups = 0;

  always @(posedge clk) if (rst_n) begin
    n_stall += $countones(~{bg_in_ready, cf_in_ready, alu_in_ready, ag_in_ready,
                            so_in_ready, jn_in_ready});
    n_term  += (bg_out_valid && bg_out_flit.done) + (cf_out_valid && cf_out_flit.done)
             + (alu_out_valid && alu_out_flit.done) + (ag_out_valid && ag_out_flit.done)
             + (so_out_valid[0] && so_out_flit[0].done) + (jn_out_valid[0] && jn_out_flit[0].done);
  end

  task automatic cfg(logic [2:0] tile, logic [1:0] r, word_t d);
    @(negedge clk);
    cfg_write = 1; cfg_addr = {tile, r}; cfg_wdata = d;
    @(negedge clk);
    cfg_write = 0;
  endtask

  // ---- one pass through a two-input tile ----
  task automatic run_bg(input word_t a[$], output word_t r[$]);
    bg_snk.got = {};
    g2[0].bg.push_col(a, 1);
    while (!bg_snk.ended()) @(posedge clk);
    bg_snk.words(r);
  endtask

  task automatic run_cf(input word_t f[$], input word_t v[$], output word_t r[$]);
    cf_snk.got = {};
    g2[0].cf.push_col(f, 1);
    g2[1].cf.push_col(v, 1);
    while (!cf_snk.ended()) @(posedge clk);
    cf_snk.words(r);
  endtask

  task automatic run_alu(input word_t a[$], input word_t b[$], input bit two, output word_t r[$]);
    al_snk.got = {};
    g2[0].al.push_col(a, 1);
    if (two) g2[1].al.push_col(b, 1);
    while (!al_snk.ended()) @(posedge clk);
    al_snk.words(r);
  endtask

  task automatic run_ag(input word_t g[$], input word_t d[$], output word_t r[$]);
    ag_snk.got = {};
    g2[0].ag.push_col(g, 1);
    g2[1].ag.push_col(d, 1);
    while (!ag_snk.ended()) @(posedge clk);
    ag_snk.words(r);
  endtask

  // ---- tables ----
  localparam int N_ORD = 24, N_LI = 110;
  word_t o_key[$];
  word_t l_key[$], l_price[$], l_disc[$], l_id[$];

  initial begin
    word_t flag[$], f_price[$], f_disc[$], f_key[$], f_id[$];
    word_t s[4][$], m[4][$], j[4][$], hundred[$], t1[$], t2[$], rev[$], keys[$], sums[$];
    word_t e_keys[$], e_sums[$];
    int key, runs, ptr[$], best, kept;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // orders: ascending unique keys; line items: random orders (a few keys
    // with no order row), random prices and discounts
    key = 0;
    for (int i = 0; i < N_ORD; i++) begin
      key += 1 + $urandom_range(2);
      o_key.push_back(key);
    end
    for (int i = 0; i < N_LI; i++) begin
      l_key.push_back(($urandom_range(9) == 0) ? key + 1 + $urandom_range(5)
                                               : o_key[$urandom_range(N_ORD - 1)]);
      l_price.push_back(100 + $urandom_range(9900));
      l_disc.push_back($urandom_range(20));
      l_id.push_back(i);
    end

    // reference result, evaluated directly on the tables
    foreach (o_key[i]) begin
      automatic longint acc = 0;
      automatic bit any = 0;
      foreach (l_key[k]) if (l_key[k] == o_key[i] && l_disc[k] > 10) begin
        any = 1;
        acc += (l_price[k] * (100 - l_disc[k])) / 100;
      end
      if (any) begin e_keys.push_back(o_key[i]); e_sums.push_back(word_t'(acc)); end
    end

    // filter phase: boolgen with constant operand, then three colfilter passes
    cfg(3'd0, 2'd0, {1'b1, CMP_GT});
    cfg(3'd0, 2'd1, 10);
    n_const++;
    run_bg(l_disc, flag);
    run_cf(flag, l_price, f_price);
    run_cf(flag, l_disc, f_disc);
    run_cf(flag, l_key, f_key);
    run_cf(flag, l_id, f_id);
    kept = f_key.size();
    n_drop = N_LI - kept;
    check(f_disc.size() == kept && f_price.size() == kept, "filtered columns have equal length");
    foreach (f_disc[i]) check($signed(f_disc[i]) > 10, "filtered discount above 10");

    // join phase: sort line items on orderkey in blocks of 32
    g4[0].so_snk.got = {};
    g4[1].so_snk.got = {};
    g4[2].so_snk.got = {};
    g4[3].so_snk.got = {};
    g4[0].so_src.push_col(f_key, 1);
    g4[1].so_src.push_col(f_price, 1);
    g4[2].so_src.push_col(f_disc, 1);
    g4[3].so_src.push_col(f_id, 1);
    while (!(g4[0].so_snk.ended() && g4[1].so_snk.ended() && g4[2].so_snk.ended()
             && g4[3].so_snk.ended())) @(posedge clk);
    g4[0].so_snk.words(s[0]);
    g4[1].so_snk.words(s[1]);
    g4[2].so_snk.words(s[2]);
    g4[3].so_snk.words(s[3]);
    check(s[0].size() == kept, "sorter returns every tuple");
    runs = (kept + 31) / 32;
    n_blocks = runs;
    for (int i = 0; i < s[0].size(); i++) begin
      if (i % 32 != 0) begin
        check($signed(s[0][i-1]) <= $signed(s[0][i]), "sorted run ascending");
        if (s[0][i-1] == s[0][i]) n_ties++;
      end
    end
    // software merge of the sorted runs
    for (int r = 0; r < runs; r++) ptr.push_back(r * 32);
    for (int c = 0; c < 4; c++) m[c] = {};
    for (int n = 0; n < kept; n++) begin
      best = -1;
      for (int r = 0; r < runs; r++)
        if (ptr[r] < (r + 1) * 32 && ptr[r] < kept)
          if (best < 0 || $signed(s[0][ptr[r]]) < $signed(s[0][ptr[best]])) best = r;
      for (int c = 0; c < 4; c++) m[c].push_back(s[c][ptr[best]]);
      ptr[best]++;
    end

    // joiner: candidate key, foreign key, price and discount from the foreign table
    cfg(3'd1, 2'd0, 0);
    g4[0].jn_snk.got = {};
    g4[1].jn_snk.got = {};
    g4[2].jn_snk.got = {};
    g4[3].jn_snk.got = {};
    g4[0].jn_src.push_col(o_key, 1);
    g4[1].jn_src.push_col(m[0], 1);
    g4[2].jn_src.push_col(m[1], 1);
    g4[3].jn_src.push_col(m[2], 1);
    while (!(g4[0].jn_snk.ended() && g4[1].jn_snk.ended() && g4[2].jn_snk.ended()
             && g4[3].jn_snk.ended())) @(posedge clk);
    g4[0].jn_snk.words(j[0]);
    g4[1].jn_snk.words(j[1]);
    g4[2].jn_snk.words(j[2]);
    g4[3].jn_snk.words(j[3]);
    n_unmatched = kept - j[0].size();
    foreach (j[0][i]) check(j[0][i] == j[1][i], "joined keys equal");

    // aggregate phase: revenue = price * (100 - discount) / 100
    foreach (j[0][i]) hundred.push_back(100);
    cfg(3'd2, 2'd0, ALU_SUB);
    run_alu(hundred, j[3], 1, t1);
    cfg(3'd2, 2'd0, ALU_MUL);
    n_reconf++;
    run_alu(j[2], t1, 1, t2);
    cfg(3'd2, 2'd0, ALU_DIV_K);
    cfg(3'd2, 2'd1, 100);
    n_reconf++;
    n_const++;
    run_alu(t2, t2, 0, rev);

    check(t1.size() == j[0].size() && t2.size() == j[0].size() && rev.size() == j[0].size(),
          "ALU passes keep the stream length");
    foreach (rev[i]) if (i < t2.size() && i < t1.size())
      check(t1[i] == 100 - j[3][i] && t2[i] == j[2][i] * t1[i] && rev[i] == t2[i] / 100,
            $sformatf("ALU results, row %0d", i));
    cfg(3'd3, 2'd0, AGG_NOP);
    run_ag(j[0], j[0], keys);
    cfg(3'd3, 2'd0, AGG_SUM);
    n_reconf++;
    run_ag(j[0], rev, sums);
    n_groups = keys.size();

    if (keys != e_keys) begin
      foreach (keys[i]) $write("%0d ", keys[i]); $display("");
      foreach (e_keys[i]) $write("%0d ", e_keys[i]); $display("");
      foreach (j[0][i]) $write("%0d ", j[0][i]); $display("");
      foreach (m[0][i]) $write("%0d ", m[0][i]); $display("");
      foreach (s[0][i]) $write("%0d ", s[0][i]); $display("");
    end
    check(keys == e_keys, "order keys of the result");
    check(sums == e_sums, "revenue per order");
    $display("%0d line items, %0d kept, %0d joined, %0d orders in the result",
             N_LI, kept, j[0].size(), keys.size());
    foreach (keys[i]) if (i < 5) $display("  order %0d revenue %0d (expected %0d)",
                                          keys[i], sums[i], e_sums[i]);

    $display("mechanisms: stalls %0d, terminators %0d, reconfigurations %0d, constant operand %0d,",
             n_stall, n_term, n_reconf, n_const);
    $display("            dropped %0d, sort blocks %0d, sort-key ties %0d, unmatched %0d, groups %0d",
             n_drop, n_blocks, n_ties, n_unmatched, n_groups);
    check(n_stall > 0, "input buffer stall happened");
    check(n_term >= 11, "terminator reached every tile output");
    check(n_reconf > 0, "runtime reconfiguration happened");
    check(n_const > 0, "constant operand mode used");
    check(n_drop > 0, "filter dropped elements");
    check(n_blocks > 1, "several sorter blocks");
    check(n_ties > 0, "ties on the sort key");
    check(n_unmatched > 0, "join rows without partner");
    check(n_groups > 1, "group boundaries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
