// dpu_query2_tb: runs the two-table test query through the processing unit.
//
// The query is
//   select t1.id, min(t2.id * t2.y) from t1, t2
//   where t1.id = t2.x and t1.id = t2.id  group by t1.id
// Plan, with the testbench as host: sort t2 on x (blocks of 32, runs merged
// here); join t1.id (candidate key) with t2.x (foreign key) carrying t2.id
// and t2.y; boolgen compares the joined key with t2.id column against column
// (==); three colfilter passes keep the rows where both conditions hold; the
// ALU multiplies t2.id by t2.y; the aggregator lists the groups (NOP) and
// takes the minimum per group (MIN). Products are signed. The result is
// compared with the query evaluated directly on the tables. All links run
// with random gaps and back pressure; dpu_top has its default parameters.
module dpu_query2_tb;
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
  int n_stall = 0, n_term = 0;

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
  localparam int N_T1 = 16, N_T2 = 90;
  word_t t1_id[$], x[$], id[$], y[$], idx[$];

  initial begin
    word_t s[4][$], m[4][$], j[4][$], flag[$], fk[$], fid[$], fy[$], prod[$], keys[$], mins[$];
    word_t e_keys[$], e_mins[$];
    int key, runs, ptr[$], best, n;

    repeat (3) @(posedge clk);
    rst_n = 1;

    key = 0;
    for (int i = 0; i < N_T1; i++) begin
      key += 1 + $urandom_range(1);
      t1_id.push_back(key);
    end
    for (int i = 0; i < N_T2; i++) begin
      automatic word_t xv = t1_id[$urandom_range(N_T1 - 1)];
      x.push_back(xv);
      id.push_back(($urandom_range(2) == 0) ? xv + 1 : xv);   // about a third fail t1.id = t2.id
      y.push_back(word_t'(int'($urandom_range(200)) - 100));
      idx.push_back(i);
    end
    foreach (t1_id[i]) begin
      automatic bit any = 0;
      automatic int mn = 0;
      foreach (x[k]) if (x[k] == t1_id[i] && id[k] == t1_id[i]) begin
        automatic int p = int'(id[k]) * int'(y[k]);
        if (!any || p < mn) mn = p;
        any = 1;
      end
      if (any) begin e_keys.push_back(t1_id[i]); e_mins.push_back(word_t'(mn)); end
    end

    // sort t2 on x
    g4[0].so_snk.got = {};
    g4[1].so_snk.got = {};
    g4[2].so_snk.got = {};
    g4[3].so_snk.got = {};
    g4[0].so_src.push_col(x, 1);
    g4[1].so_src.push_col(id, 1);
    g4[2].so_src.push_col(y, 1);
    g4[3].so_src.push_col(idx, 1);
    while (!(g4[0].so_snk.ended() && g4[1].so_snk.ended() && g4[2].so_snk.ended()
             && g4[3].so_snk.ended())) @(posedge clk);
    g4[0].so_snk.words(s[0]);
    g4[1].so_snk.words(s[1]);
    g4[2].so_snk.words(s[2]);
    g4[3].so_snk.words(s[3]);
    check(s[0].size() == N_T2, "sorter returns every tuple");
    runs = (N_T2 + 31) / 32;
    for (int r = 0; r < runs; r++) ptr.push_back(r * 32);
    for (n = 0; n < N_T2; n++) begin
      best = -1;
      for (int r = 0; r < runs; r++)
        if (ptr[r] < (r + 1) * 32 && ptr[r] < N_T2)
          if (best < 0 || $signed(s[0][ptr[r]]) < $signed(s[0][ptr[best]])) best = r;
      for (int c = 0; c < 4; c++) m[c].push_back(s[c][ptr[best]]);
      ptr[best]++;
    end
    for (int i = 1; i < N_T2; i++) check($signed(m[0][i-1]) <= $signed(m[0][i]), "merged runs ascending");

    // join t1.id = t2.x, payloads t2.id and t2.y from the foreign table
    cfg(3'd1, 2'd0, 0);
    g4[0].jn_snk.got = {};
    g4[1].jn_snk.got = {};
    g4[2].jn_snk.got = {};
    g4[3].jn_snk.got = {};
    g4[0].jn_src.push_col(t1_id, 1);
    g4[1].jn_src.push_col(m[0], 1);
    g4[2].jn_src.push_col(m[1], 1);
    g4[3].jn_src.push_col(m[2], 1);
    while (!(g4[0].jn_snk.ended() && g4[1].jn_snk.ended() && g4[2].jn_snk.ended()
             && g4[3].jn_snk.ended())) @(posedge clk);
    g4[0].jn_snk.words(j[0]);
    g4[1].jn_snk.words(j[1]);
    g4[2].jn_snk.words(j[2]);
    g4[3].jn_snk.words(j[3]);
    check(j[0].size() == N_T2, "every t2 row has its t1 partner");

    // second condition: key == t2.id, column against column
    cfg(3'd0, 2'd0, {1'b0, CMP_EQ});
    bg_snk.got = {};
    g2[0].bg.push_col(j[0], 1);
    g2[1].bg.push_col(j[2], 1);
    while (!bg_snk.ended()) @(posedge clk);
    bg_snk.words(flag);
    foreach (flag[i]) check(flag[i] == word_t'(j[0][i] == j[2][i]), "equality flag");
    run_cf(flag, j[0], fk);
    run_cf(flag, j[2], fid);
    run_cf(flag, j[3], fy);

    cfg(3'd2, 2'd0, ALU_MUL);
    run_alu(fid, fy, 1, prod);
    cfg(3'd3, 2'd0, AGG_NOP);
    run_ag(fk, fk, keys);
    cfg(3'd3, 2'd0, AGG_MIN);
    run_ag(fk, prod, mins);

    check(keys == e_keys, "groups of the result");
    check(mins == e_mins, "minimum per group");
    $display("%0d t2 rows, %0d pass both conditions, %0d groups", N_T2, fk.size(), keys.size());
    check(fk.size() < N_T2 && fk.size() > 0, "second condition drops rows");
    check(keys.size() > 1, "several groups");
    check(n_stall > 0, "input buffer stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
