// aggregator_tile_tb: checks every aggregation function of the group-by tile.
//
// For each function the tile is reconfigured, a stream of groups (runs of
// equal keys, run lengths 1 to 6, keys not sorted, a key may come back in a
// later run) with signed values is streamed in under random gaps and back
// pressure, and the per-run results are compared with values computed here.
// An empty stream must give only the terminator.
module aggregator_tile_tb;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_write = 0;
  logic [1:0] cfg_addr = 0;
  word_t cfg_wdata = 0;
  logic [1:0] in_valid, in_ready;
  flit_t [1:0] in_flit;
  logic out_valid, out_ready;
  flit_t out_flit;

  st_source s0 (.clk, .rst_n, .valid(in_valid[0]), .flit(in_flit[0]), .ready(in_ready[0]));
  st_source s1 (.clk, .rst_n, .valid(in_valid[1]), .flit(in_flit[1]), .ready(in_ready[1]));
  st_sink   snk (.clk, .rst_n, .valid(out_valid), .flit(out_flit), .ready(out_ready));

  aggregator_tile dut (.clk, .rst_n, .cfg_write, .cfg_addr, .cfg_wdata,
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

  word_t g[$], d[$], exp[$], got[$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 6; op++) begin
      automatic int key = 0;
      cfg(0, op);
      g = {}; d = {}; exp = {};
      for (int run = 0; run < 15; run++) begin
        automatic int len = 1 + $urandom_range(5);
        automatic longint sum = 0;
        automatic int mn = 0, mx = 0, first = 0;
        key = (key + 1 + $urandom_range(3)) % 7;     // differs from the previous key
        for (int i = 0; i < len; i++) begin
          automatic int v = int'($urandom_range(2000)) - 1000;
          g.push_back(key);
          d.push_back(v);
          if (i == 0) begin mn = v; mx = v; first = v; end
          if (v < mn) mn = v;
          if (v > mx) mx = v;
          sum += v;
        end
        case (op)
          0: exp.push_back(first);
          1: exp.push_back(len);
          2: exp.push_back(word_t'(sum));
          3: exp.push_back(mn);
          4: exp.push_back(mx);
          default: exp.push_back(word_t'(int'(sum) / len));
        endcase
      end
      snk.got = {};
      s0.push_col(g, 1);
      s1.push_col(d, 1);
      while (!snk.ended()) @(posedge clk);
      snk.words(got);
      check(got == exp, $sformatf("function %0d over 15 groups", op));
      check(snk.got.size() == 16, "terminator last");
    end
    // empty stream
    g = {};
    snk.got = {};
    s0.push_col(g, 1);
    s1.push_col(g, 1);
    while (!snk.ended()) @(posedge clk);
    check(snk.got.size() == 1, "empty stream gives only the terminator");
    check(snk.violations == 0, "ready latency 1 respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
