// boolgen_tile_tb: checks every condition of the boolgen tile, comparing two
// columns and comparing a column with the internal constant.
//
// Random signed columns with many repeated values (so that equality occurs)
// are streamed in under random gaps and back pressure; each output bit is
// compared with the condition evaluated here. The terminator must come last.
module boolgen_tile_tb;
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

  boolgen_tile dut (.clk, .rst_n, .cfg_write, .cfg_addr, .cfg_wdata,
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

  function automatic bit model(int c, int a, int b);
    case (c)
      0: return a == b;
      1: return a != b;
      2: return a < b;
      3: return a <= b;
      4: return a > b;
      default: return a >= b;
    endcase
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t a[$], b[$], exp[$], got[$];
    word_t k;
    int ones;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 12; mode++) begin
      automatic int c = mode % 6;
      automatic bit kc = mode >= 6;
      k = word_t'($urandom_range(10) - 5);
      cfg(0, {kc, 3'(c)});
      cfg(1, k);
      a = {}; b = {}; exp = {};
      for (int i = 0; i < 50; i++) begin
        a.push_back(word_t'($urandom_range(10) - 5));
        b.push_back(word_t'($urandom_range(10) - 5));
        exp.push_back(word_t'(model(c, $signed(a[i]), kc ? $signed(k) : $signed(b[i]))));
      end
      snk.got = {};
      s0.push_col(a, 1);
      if (!kc) s1.push_col(b, 1);
      while (!snk.ended()) @(posedge clk);
      snk.words(got);
      ones = 0;
      foreach (got[i]) ones += got[i][0];
      check(got == exp, $sformatf("condition %0d, constant mode %0d", c, kc));
      check(snk.got.size() == 51, "terminator last");
      check(ones > 0 && ones < 50, "both outcomes seen");
    end
    check(snk.violations == 0, "ready latency 1 respected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
