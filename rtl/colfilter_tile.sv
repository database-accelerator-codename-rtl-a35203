// colfilter_tile: keeps the elements of a column whose flag is set.
//
// Input 1 is a boolean stream (bit 0 of the word), input 2 a column of any
// type. For every pair (in1[i], in2[i]) it emits in2[i] if in1[i] is 1 and
// nothing otherwise, so the output is never longer than the inputs. A pair of
// terminators becomes a terminator on the output.
//
// Structure and timing are those of every tile: input st_buffers, registered
// downstream ready (Avalon-ST ready latency 1). A dropped pair is consumed
// without waiting for the downstream ready; a kept pair or a terminator waits
// for it. The tile has no configuration.
module colfilter_tile
  import dpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  in_valid,
  input  flit_t [1:0] in_flit,
  output logic [1:0]  in_ready,
  output logic        out_valid,
  output flit_t       out_flit,
  input  logic        out_ready
);

  logic was_rdy;

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

  always_ff @(posedge clk) begin
    if (!rst_n) was_rdy <= 1'b0;
    else        was_rdy <= out_ready;
  end

  logic done_in, keep;

  always_comb begin
    done_in   = buf_flit[0].done & buf_flit[1].done;
    keep      = buf_flit[0].data[0];
    out_valid = 1'b0;
    out_flit  = '0;
    buf_next  = '0;
    if (&buf_valid) begin
      if (done_in || keep) begin
        if (was_rdy) begin
          out_valid     = 1'b1;
          out_flit.done = done_in;
          out_flit.data = done_in ? '0 : buf_flit[1].data;
          buf_next      = 2'b11;
        end
      end else begin
        buf_next = 2'b11;
      end
    end
  end

  // Ready latency 1: send only in a cycle after the downstream was ready.
  a_ready_latency: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> was_rdy);

endmodule
