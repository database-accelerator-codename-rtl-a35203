// st_sink: testbench stream sink, Avalon-ST with ready latency 1.
//
// ready is raised with probability READY_PCT percent in each cycle. Every
// cycle with valid high is a transfer; the flit is appended to `got`. A valid
// that follows a cycle with ready low breaks the ready-latency-1 rule and is
// counted in `violations`.
module st_sink
  import dpu_pkg::*;
#(
  parameter int unsigned READY_PCT = 70
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  flit_t flit,
  output logic  ready
);

  flit_t       got[$];
  int unsigned violations = 0;
  int unsigned pct = READY_PCT;
  logic        ready_q = 1'b0;

  initial ready = 1'b0;

  // values of the data words received, terminators excluded
  function automatic void words(output word_t w[$]);
    w = {};
    foreach (got[i]) if (!got[i].done) w.push_back(got[i].data);
  endfunction

  function automatic bit ended();
    return got.size() > 0 && got[got.size()-1].done;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      ready   <= 1'b0;
      ready_q <= 1'b0;
    end else begin
      if (valid) begin
        if (!ready_q) violations++;
        got.push_back(flit);
      end
      ready_q <= ready;
      ready   <= ($urandom_range(99) < pct);
    end
  end

endmodule
