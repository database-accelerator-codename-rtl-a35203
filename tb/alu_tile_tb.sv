// alu_tile_tb: checks the ALU tile for all eight opcodes.
//
// For each opcode the tile is reconfigured through its write port, two
// 60-element random columns (and a random constant) are streamed in with
// random gaps and random downstream back pressure, and the output column is
// compared with results computed here. The terminator must come out last.
// A final run at full rate checks that one result leaves per cycle.
module alu_tile_tb;
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

  alu_tile dut (.clk, .rst_n, .cfg_write, .cfg_addr, .cfg_wdata,
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

  function automatic word_t model(int op, word_t a, word_t b);
    longint sa = $signed(a), sb = $signed(b);
    case (op % 4)
      0: return word_t'(sa + sb);
      1: return word_t'(sa - sb);
      2: return word_t'(sa * sb);
      default: return (sb == 0) ? 0 : word_t'(sa / sb);
    endcase
  endfunction

  function automatic word_t rnd();
    case ($urandom_range(3))
      0: return $urandom_range(20);
      1: return -$urandom_range(20);
      2: return $urandom_range(100000);
      default: return $urandom & 32'h7fff_ffff;
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
    automatic int n = 60, t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 8; op++) begin
      k = rnd();
      cfg(0, op);
      cfg(1, k);
      a = {}; b = {}; exp = {};
      for (int i = 0; i < n; i++) begin
        a.push_back(rnd());
        b.push_back(rnd());
        exp.push_back(model(op, a[i], op >= 4 ? k : b[i]));
      end
      snk.got = {};
      s0.push_col(a, 1);
      if (op < 4) s1.push_col(b, 1);
      while (!(snk.ended())) @(posedge clk);
      snk.words(got);
      check(got == exp, $sformatf("op %0d results", op));
      check(snk.got.size() == n + 1, $sformatf("op %0d terminator last", op));
      repeat (5) @(posedge clk);
    end
    check(snk.violations == 0, "ready latency 1 respected");

    // full rate: one result per cycle
    s0.pct = 100; s1.pct = 100; snk.pct = 100;
    cfg(0, ALU_MUL);
    repeat (3) @(posedge clk);
    a = {}; b = {}; exp = {};
    for (int i = 0; i < 50; i++) begin
      a.push_back(i); b.push_back(i + 1); exp.push_back(i * (i + 1));
    end
    snk.got = {};
    s0.push_col(a, 1);
    s1.push_col(b, 1);
    while (!(snk.got.size() == 1)) @(posedge clk);
    t0 = $time;
    while (!(snk.ended())) @(posedge clk);
    t1 = $time;
    snk.words(got);
    check(got == exp, "full-rate results");
    check((t1 - t0) / 10 == 50, $sformatf("51 flits in %0d cycles", (t1 - t0) / 10 + 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
