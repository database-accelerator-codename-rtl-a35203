// colfilter_tile_tb: checks the column filter.
//
// Several streams of random flags and values, including all-false flags (an
// empty output) and a dropped last element, are filtered under random gaps
// and back pressure. The output must hold exactly the flagged values in order,
// followed by one terminator.
module colfilter_tile_tb;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] in_valid, in_ready;
  flit_t [1:0] in_flit;
  logic out_valid, out_ready;
  flit_t out_flit;

  st_source s0 (.clk, .rst_n, .valid(in_valid[0]), .flit(in_flit[0]), .ready(in_ready[0]));
  st_source s1 (.clk, .rst_n, .valid(in_valid[1]), .flit(in_flit[1]), .ready(in_ready[1]));
  st_sink   snk (.clk, .rst_n, .valid(out_valid), .flit(out_flit), .ready(out_ready));

  colfilter_tile dut (.clk, .rst_n, .in_valid, .in_flit, .in_ready, .out_valid, .out_flit, .out_ready);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t f[$], v[$], exp[$], got[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 10; run++) begin
      automatic int n = 1 + $urandom_range(80);
      f = {}; v = {}; exp = {};
      for (int i = 0; i < n; i++) begin
        automatic bit keep = (run == 0) ? 1'b0 : ($urandom_range(2) == 0);
        if (i == n - 1) keep = 1'b0;             // last element always dropped
        f.push_back(word_t'(keep));
        v.push_back($urandom);
        if (keep) exp.push_back(v[i]);
      end
      snk.got = {};
      s0.push_col(f, 1);
      s1.push_col(v, 1);
      while (!snk.ended()) @(posedge clk);
      snk.words(got);
      check(got == exp, $sformatf("run %0d: %0d of %0d kept", run, exp.size(), n));
      check(snk.got.size() == exp.size() + 1, "one terminator, last");
    end
    check(snk.violations == 0, "ready latency 1 respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
