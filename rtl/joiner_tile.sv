// joiner_tile: equi-join of two tables that are both sorted on the join key.
//
// Input 1 is the candidate table's key column (a primary key: each value at
// most once), input 2 the foreign table's key column, and inputs 3..NCOLS are
// payload columns. A configuration bit per payload column says which table it
// belongs to (1 = candidate, 0 = foreign); a candidate payload advances with
// input 1, a foreign payload with input 2. For every pair i, j with
// in1[i] == in2[j] the tile emits the tuple (in1[i], in2[j], payloads at i or j)
// on its NCOLS outputs. NCOLS = 4 and the bit-per-payload opcode follow the
// reference design.
//
// Both key streams are assumed ascending in signed order. The tile is a merge
// join, one step per cycle:
//   key1 == key2 : emit the tuple (needs the registered downstream ready),
//                  advance the foreign side (more foreign rows may match);
//   key1 <  key2 : advance the candidate side;
//   key1 >  key2 : advance the foreign side (row without partner).
// When one side has ended (terminator) the other side is drained without
// output; when both have ended one terminator is sent on every output.
// A side is advanced only when all its columns hold a flit.
//
// Timing: input st_buffers and a registered AND of the output readys
// (Avalon-ST ready latency 1), as in every tile. All outputs are valid
// together. Configuration: address 0, bits [NCOLS-3:0] (reset 0, all foreign).
module joiner_tile
  import dpu_pkg::*;
#(
  parameter int unsigned NCOLS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_write,
  input  logic [1:0]        cfg_addr,
  input  word_t             cfg_wdata,
  input  logic [NCOLS-1:0]  in_valid,
  input  flit_t [NCOLS-1:0] in_flit,
  output logic [NCOLS-1:0]  in_ready,
  output logic [NCOLS-1:0]  out_valid,
  output flit_t [NCOLS-1:0] out_flit,
  input  logic [NCOLS-1:0]  out_ready
);

  // cand_mask[c] = 1: column c belongs to the candidate table (column 0
  // always, column 1 never, payloads as configured).
  logic [NCOLS-1:0] cand_mask;
  logic [NCOLS-3:0] payload_cand;
  logic [NCOLS-1:0] was_rdy;

  logic  [NCOLS-1:0] buf_valid;
  flit_t [NCOLS-1:0] buf_flit;
  logic  [NCOLS-1:0] buf_next;

  for (genvar i = 0; i < NCOLS; i++) begin : g_buf
    st_buffer u_buf (
      .clk, .rst_n,
      .in_valid (in_valid[i]), .in_flit (in_flit[i]), .in_ready (in_ready[i]),
      .out_valid(buf_valid[i]), .out_flit(buf_flit[i]), .next(buf_next[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      payload_cand <= '0;
      was_rdy      <= '0;
    end else begin
      was_rdy <= out_ready;
      if (cfg_write && cfg_addr == 2'd0) payload_cand <= cfg_wdata[NCOLS-3:0];
    end
  end

  assign cand_mask = {payload_cand, 2'b01};

  logic  cand_ok, fgn_ok, cand_done, fgn_done, send_ok;
  word_t key1, key2;

  always_comb begin
    // a side is ready when every column that belongs to it holds a flit
    cand_ok   = &(buf_valid | ~cand_mask);
    fgn_ok    = &(buf_valid | cand_mask);
    cand_done = buf_flit[0].done;
    fgn_done  = buf_flit[1].done;
    key1      = buf_flit[0].data;
    key2      = buf_flit[1].data;
    send_ok   = &was_rdy;

    out_valid = '0;
    out_flit  = '0;
    buf_next  = '0;
    if (cand_ok && fgn_ok) begin
      if (cand_done && fgn_done) begin
        if (send_ok) begin
          out_valid = '1;
          for (int c = 0; c < NCOLS; c++) out_flit[c].done = 1'b1;
          buf_next = '1;
        end
      end else if (cand_done) begin
        buf_next = ~cand_mask;               // drain the foreign side
      end else if (fgn_done) begin
        buf_next = cand_mask;                // drain the candidate side
      end else if (key1 == key2) begin
        if (send_ok) begin
          out_valid = '1;
          for (int c = 0; c < NCOLS; c++) out_flit[c].data = buf_flit[c].data;
          buf_next = ~cand_mask;
        end
      end else if ($signed(key1) < $signed(key2)) begin
        buf_next = cand_mask;
      end else begin
        buf_next = ~cand_mask;
      end
    end
  end

  // Ready latency 1: send only in a cycle after the downstream was ready.
  a_ready_latency: assert property (@(posedge clk) disable iff (!rst_n)
    |out_valid |-> &was_rdy);

endmodule
