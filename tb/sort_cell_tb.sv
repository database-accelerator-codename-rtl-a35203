// sort_cell_tb: checks one column of two stacked sorter cells.
//
// The top cell receives "don't know" and decides from its own comparison; the
// lower cell must follow the top cell's SWAP or PASS, and decide on its own
// only when the top elements are equal. 2000 random steps (with bubbles, and
// occasional shift and clear operations) are applied, and the held and
// passed elements and the commands are compared with a model of the rule.
module sort_cell_tb;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear = 0, step = 0, shift = 0, in_valid = 0, left_valid = 0;
  word_t in0 = 0, in1 = 0, left0 = 0, left1 = 0;
  sort_cmd_e cmd01, cmd_bot;
  logic  cv0, cv1, pv0, pv1;
  word_t cd0, cd1, pd0, pd1;

  sort_cell top (.clk, .rst_n, .clear, .step, .shift, .in_valid, .in_data(in0),
                 .cmd_in(SC_DK), .cmd_out(cmd01), .left_valid, .left_data(left0),
                 .cur_valid(cv0), .cur_data(cd0), .pass_valid(pv0), .pass_data(pd0));
  sort_cell bot (.clk, .rst_n, .clear, .step, .shift, .in_valid, .in_data(in1),
                 .cmd_in(cmd01), .cmd_out(cmd_bot), .left_valid, .left_data(left1),
                 .cur_valid(cv1), .cur_data(cd1), .pass_valid(pv1), .pass_data(pd1));

  int checks = 0, failures = 0, swaps = 0, dks = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  bit m_cv = 0, m_pv = 0;
  int m_c0, m_c1, m_p0, m_p1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      automatic int r = $urandom_range(99);
      automatic bit sw;
      @(negedge clk);
      clear = (r < 2);
      shift = (r >= 2 && r < 6);
      step  = !clear && !shift && (r < 90);
      in_valid = ($urandom_range(3) != 0);
      in0 = word_t'(int'($urandom_range(4)) - 2);
      in1 = word_t'(int'($urandom_range(4)) - 2);
      left_valid = $urandom_range(1);
      left0 = $urandom; left1 = $urandom;
      #1;
      // expected decision
      if (!m_cv)                           sw = 1;
      else if ($signed(in0) != m_c0)       sw = $signed(in0) > m_c0;
      else                                 sw = $signed(in1) > m_c1;
      if (m_cv) begin
        check(cmd01 == (($signed(in0) > m_c0) ? SC_SWAP : ($signed(in0) < m_c0) ? SC_PASS : SC_DK),
              "top command");
        if ($signed(in0) == m_c0) dks++;
      end
      check((cmd_bot == SC_SWAP) == sw, "lower cell decision");
      @(posedge clk);
      if (clear) begin
        m_cv = 0; m_pv = 0;
      end else if (shift) begin
        m_cv = left_valid; m_c0 = left0; m_c1 = left1; m_pv = 0;
      end else if (step) begin
        if (!in_valid) m_pv = 0;
        else if (sw) begin
          swaps++;
          m_pv = m_cv; m_p0 = m_c0; m_p1 = m_c1;
          m_cv = 1; m_c0 = $signed(in0); m_c1 = $signed(in1);
        end else begin
          m_pv = 1; m_p0 = $signed(in0); m_p1 = $signed(in1);
        end
      end
      #1;
      check(cv0 == m_cv && cv1 == m_cv, "held valid");
      if (m_cv) check(cd0 == word_t'(m_c0) && cd1 == word_t'(m_c1), "held elements");
      check(pv0 == m_pv && pv1 == m_pv, "passed valid");
      if (m_pv) check(pd0 == word_t'(m_p0) && pd1 == word_t'(m_p1), "passed elements");
    end
    check(swaps > 100 && dks > 100, "swaps and ties exercised");
    $display("swaps %0d, ties on the top row %0d", swaps, dks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
