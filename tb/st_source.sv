// st_source: testbench stream source, Avalon-ST with ready latency 1.
//
// Flits queued with push() are sent in order. A flit is offered in a cycle only
// if the sink's ready was high in the previous cycle, and then only with
// probability VALID_PCT percent, so the stream has random gaps. Every offered
// flit counts as transferred (ready latency 1 semantics).
module st_source
  import dpu_pkg::*;
#(
  parameter int unsigned VALID_PCT = 70
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  valid,
  output flit_t flit,
  input  logic  ready
);

  flit_t q[$];
  int unsigned pct = VALID_PCT;

  function automatic void push(flit_t f);
    q.push_back(f);
  endfunction

  function automatic void push_col(word_t d[$], logic term);
    foreach (d[i]) q.push_back('{done: 1'b0, data: d[i]});
    if (term) q.push_back('{done: 1'b1, data: '0});
  endfunction

  function automatic bit idle();
    return q.size() == 0;
  endfunction

  initial begin
    valid = 1'b0;
    flit  = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
    end else if (ready && q.size() > 0 && $urandom_range(99) < pct) begin
      valid <= 1'b1;
      flit  <= q.pop_front();
    end else begin
      valid <= 1'b0;
    end
  end

endmodule
