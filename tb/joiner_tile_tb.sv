// joiner_tile_tb: checks the merge equi-join.
//
// Each run builds a candidate table with ascending unique keys and a foreign
// table with ascending, repeated keys (some without partner on either side),
// picks a payload configuration (each payload column from the candidate or the
// foreign table) and streams both tables in under random gaps and back
// pressure. The four output columns are compared with a nested-loop join done
// here. Runs include an empty candidate table.
module joiner_tile_tb;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_write = 0;
  logic [1:0] cfg_addr = 0;
  word_t cfg_wdata = 0;
  logic  [3:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [3:0] in_flit, out_flit;

  for (genvar i = 0; i < 4; i++) begin : g_io
    st_source src (.clk, .rst_n, .valid(in_valid[i]), .flit(in_flit[i]), .ready(in_ready[i]));
    st_sink   snk (.clk, .rst_n, .valid(out_valid[i]), .flit(out_flit[i]), .ready(out_ready[i]));
  end

  joiner_tile dut (.clk, .rst_n, .cfg_write, .cfg_addr, .cfg_wdata,
                   .in_valid, .in_flit, .in_ready, .out_valid, .out_flit, .out_ready);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg(logic [1:0] a, word_t d);
    @(negedge clk);
    cfg_write = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_write = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t ck[$], cp3[$], cp4[$], fk[$], fp3[$], fp4[$];
  word_t e[4][$], got[$];
  int total_matches = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      automatic logic [1:0] pc = 2'(run);    // payload-is-candidate bits
      automatic int key = -10;
      cfg(0, pc);
      ck = {}; cp3 = {}; cp4 = {}; fk = {}; fp3 = {}; fp4 = {};
      if (run != 5) begin
        for (int i = 0; i < 20; i++) begin
          key += 1 + $urandom_range(2);
          ck.push_back(key); cp3.push_back($urandom); cp4.push_back($urandom);
        end
      end
      key = -12;
      for (int j = 0; j < 40; j++) begin
        if ($urandom_range(2) != 0) key += 1;
        fk.push_back(key); fp3.push_back($urandom); fp4.push_back($urandom);
      end
      // reference: nested-loop join in foreign order
      for (int c = 0; c < 4; c++) e[c] = {};
      foreach (fk[j]) foreach (ck[i]) if (ck[i] == fk[j]) begin
        e[0].push_back(ck[i]);
        e[1].push_back(fk[j]);
        e[2].push_back(pc[0] ? cp3[i] : fp3[j]);
        e[3].push_back(pc[1] ? cp4[i] : fp4[j]);
      end
      total_matches += e[0].size();
      g_io[0].snk.got = {}; g_io[1].snk.got = {}; g_io[2].snk.got = {}; g_io[3].snk.got = {};
      g_io[0].src.push_col(ck, 1);
      g_io[1].src.push_col(fk, 1);
      g_io[2].src.push_col(pc[0] ? cp3 : fp3, 1);
      g_io[3].src.push_col(pc[1] ? cp4 : fp4, 1);
      while (!(g_io[0].snk.ended() && g_io[1].snk.ended() && g_io[2].snk.ended()
               && g_io[3].snk.ended())) @(posedge clk);
      g_io[0].snk.words(got); check(got == e[0], $sformatf("run %0d key column", run));
      g_io[1].snk.words(got); check(got == e[1], $sformatf("run %0d foreign key column", run));
      g_io[2].snk.words(got); check(got == e[2], $sformatf("run %0d payload 3", run));
      g_io[3].snk.words(got); check(got == e[3], $sformatf("run %0d payload 4", run));
      check(g_io[0].snk.got.size() == e[0].size() + 1, "terminator last");
      $display("run %0d: %0d matches", run, e[0].size());
    end
    check(total_matches > 20, "joins produced matches");
    check(g_io[0].snk.violations == 0, "ready latency 1 respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
