// aggregator_tile: group-by over runs of equal group keys.
//
// Input 1 carries the group key g, input 2 the value d. Consecutive pairs with
// the same key form a group; when the key changes, or the stream ends, the tile
// emits one word f(d[i..j]) for the finished group, where f is count, sum, min,
// max or average (the reference design's five functions) or NOP, which emits the group's
// first value (used with the key column on both inputs to list the groups).
// Only equality is tested on keys. Sum and average wrap at 32 bits; average is
// the signed sum divided by the count, rounded toward zero. The opcode
// encoding (agg_op_e) is this design's own.
//
// State: the current key, an accumulator (first, sum, min or max) and a
// count. A pair of the current group is absorbed in one cycle without output.
// A pair that opens a new group emits the old result and starts the new group
// in the same cycle, which needs the registered downstream ready. On the
// terminator pair the last result is emitted first, then the terminator in a
// later cycle. Timing otherwise as in every tile: input st_buffers and
// registered downstream ready (Avalon-ST ready latency 1).
// Configuration: address 0, opcode [2:0] (reset 0, NOP).
module aggregator_tile
  import dpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_write,
  input  logic [1:0]  cfg_addr,
  input  word_t       cfg_wdata,
  input  logic [1:0]  in_valid,
  input  flit_t [1:0] in_flit,
  output logic [1:0]  in_ready,
  output logic        out_valid,
  output flit_t       out_flit,
  input  logic        out_ready
);

  agg_op_e op;
  logic    was_rdy;

  logic    have_grp;
  word_t   grp, acc, sum, cnt;

  logic  [1:0] buf_valid;
  flit_t [1:0] buf_flit;
  logic  [1:0] buf_next;

  for (genvar i = 0; i < 2; i++) begin : g_buf
    st_buffer u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]), .in_flit (in_flit[i]), .in_ready (in_ready[i]),
      .out_valid(buf_valid[i]), .out_flit(buf_flit[i]), .next(buf_next[i])
    );
  end

  word_t g, d, result, acc_next;
  logic  pair_ok, done_in, start, absorb, close_grp;

  always_comb begin
    g       = buf_flit[0].data;
    d       = buf_flit[1].data;
    pair_ok = &buf_valid;
    done_in = buf_flit[0].done & buf_flit[1].done;

    case (op)
      AGG_COUNT: result = cnt;
      AGG_SUM:   result = sum;
      AGG_AVG:   result = sdiv(sum, cnt);
      default:   result = acc;           // NOP (first), MIN, MAX
    endcase

    case (op)
      AGG_MIN: acc_next = ($signed(d) < $signed(acc)) ? d : acc;
      AGG_MAX: acc_next = ($signed(d) > $signed(acc)) ? d : acc;
      default: acc_next = acc;
    endcase

    start     = 1'b0;   // load (g, d) as a new group
    absorb    = 1'b0;   // fold d into the current group
    close_grp = 1'b0;   // the current group is emitted
    out_valid = 1'b0;
    out_flit  = '0;
    buf_next  = '0;
    if (pair_ok) begin
      if (done_in) begin
        if (was_rdy) begin
          out_valid = 1'b1;
          if (have_grp) begin
            out_flit.data = result;      // last group first, terminator next
            close_grp     = 1'b1;
          end else begin
            out_flit.done = 1'b1;
            buf_next      = 2'b11;
          end
        end
      end else if (!have_grp) begin
        start    = 1'b1;
        buf_next = 2'b11;
      end else if (g == grp) begin
        absorb   = 1'b1;
        buf_next = 2'b11;
      end else if (was_rdy) begin
        out_valid     = 1'b1;
        out_flit.data = result;
        start         = 1'b1;
        buf_next      = 2'b11;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op       <= AGG_NOP;
      was_rdy  <= 1'b0;
      have_grp <= 1'b0;
      grp      <= '0;
      acc      <= '0;
      sum      <= '0;
      cnt      <= '0;
    end else begin
      was_rdy <= out_ready;
      if (cfg_write && cfg_addr == 2'd0) op <= agg_op_e'(cfg_wdata[2:0]);
      if (start) begin
        have_grp <= 1'b1;
        grp      <= g;
        acc      <= d;
        sum      <= d;
        cnt      <= 1;
      end else if (absorb) begin
        acc <= acc_next;
        sum <= sum + d;
        cnt <= cnt + 1;
      end else if (close_grp) begin
        have_grp <= 1'b0;
      end
    end
  end

  // Ready latency 1: send only in a cycle after the downstream was ready.
  a_ready_latency: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> was_rdy);

endmodule
