// st_buffer_tb: checks the two-slot input buffer.
//
// A ready-latency-1 source sends 400 random words into the buffer while the
// consumer takes them with a random `next`. Checked: words come out complete
// and in order; in_ready follows the state table, with the state taken from a
// model of how many words are held (EMPTY 1, MAIN_FULL
// !(in_valid & !next), AUX_FULL 0); the aux slot gets used; a word sent into an
// empty buffer is offered one cycle later; and with source and consumer always
// active the buffer streams one word per cycle using only the main slot.
module st_buffer_tb;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, next;
  flit_t in_flit, out_flit;

  st_source #(.VALID_PCT(60)) src (.clk, .rst_n, .valid(in_valid), .flit(in_flit), .ready(in_ready));
  st_buffer dut (.clk, .rst_n, .in_valid, .in_flit, .in_ready, .out_valid, .out_flit, .next);

  int checks = 0, failures = 0;
  int unsigned next_pct = 50;
  word_t sent[$], taken[$];
  int aux_cycles = 0, main_cycles = 0, cyc = 0, occ = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // random consumer
  always @(negedge clk) next = out_valid && ($urandom_range(99) < next_pct);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // state table of the buffer, seen from its ports
    if (!out_valid) check(in_ready == 1'b1, "ready in EMPTY");
    if (occ == 1) begin
      main_cycles++;
      check(in_ready == !(in_valid && !next), "ready in MAIN_FULL");
    end
    if (occ == 2) begin
      aux_cycles++;
      check(out_valid, "valid in AUX_FULL");
      check(in_ready == 1'b0, "ready in AUX_FULL");
    end
    if (occ > 0) check(out_valid, "valid when holding data");
    if (out_valid && next) taken.push_back(out_flit.data);
    // occupancy model: words sent in minus words consumed
    occ = occ + (in_valid ? 1 : 0) - ((out_valid && next) ? 1 : 0);
    check(occ <= 2, "never more than two words held");
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w;
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      w = $urandom;
      sent.push_back(w);
      src.push('{done: 1'b0, data: w});
    end
    while (!(taken.size() == 400)) @(posedge clk);
    check(taken == sent, "order and content of 400 random words");
    check(aux_cycles > 0, "aux slot used under back pressure");
    $display("main-full cycles %0d, aux-full cycles %0d", main_cycles, aux_cycles);

    // latency: a word into an empty buffer is offered in the next cycle
    next_pct = 0;
    repeat (5) @(posedge clk);
    check(!out_valid, "buffer empty before latency test");
    src.push('{done: 1'b1, data: 32'h1234});
    @(posedge clk iff in_valid);
    #1 check(out_valid && out_flit.done && out_flit.data == 32'h1234, "one-cycle latency, done bit kept");
    next_pct = 100;
    @(posedge clk);
    #1 check(!out_valid, "buffer empties after consume");

    // full rate: one word per cycle, the aux slot stays unused
    src.pct = 100;
    aux_cycles = 0;
    taken = {};
    sent = {};
    for (int i = 0; i < 100; i++) begin
      sent.push_back(i);
      src.push('{done: 1'b0, data: i});
    end
    t0 = cyc;
    while (!(taken.size() == 100)) @(posedge clk);
    check(taken == sent, "full-rate words in order");
    check(cyc - t0 <= 103, "full rate: one word per cycle");
    check(aux_cycles == 0, "full rate uses only the main slot");
    $display("100 words in %0d cycles", cyc - t0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
