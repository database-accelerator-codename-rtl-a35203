// sorter_tile: sorts blocks of K tuples of NCOLS columns.
//
// Each block of up to K tuples is returned in ascending order of column 1,
// ties broken by column 2, then column 3 and so on (column 1 has the highest
// priority). Longer streams come out as sorted runs of K tuples, to be merged
// by software. The reference design's instance has NCOLS = 4 inputs and outputs and a
// block size K = 32; those are the defaults.
//
// The tile is a mesh of NCOLS x K sort_cell elements: row r sorts column r,
// and each cell passes its SWAP / PASS / don't-know decision to the cell below
// (see sort_cell). Operation, in phases:
//   FILL  : the mesh steps every cycle. When every input buffer holds a flit,
//           the tuple is injected into cell 0 of each row; the others move
//           one cell to the right per cycle (bubbles where nothing was
//           injected). After K tuples, or on a terminator, go to FLUSH.
//   FLUSH : keep stepping with bubbles until no element is in flight.
//           Cell 0 now holds the largest tuple, cell n-1 the smallest.
//   DRAIN : shift the held tuples one cell to the right per cycle; whenever
//           the last cell holds a tuple it is sent on all outputs (this needs
//           the registered downstream ready). Empty cells are shifted out
//           without output. When the mesh is empty go back to FILL, or to
//           TERM if the block ended with a terminator.
//   TERM  : send the terminator on every output.
// A block of n tuples thus takes about n cycles to load, up to K to flush and
// K to unload. The phase controller is this design's own; the cell rule and
// the mesh with commands follow the reference design.
// Timing: input st_buffers and registered AND of output readys (Avalon-ST
// ready latency 1), as in every tile. No configuration.
module sorter_tile
  import dpu_pkg::*;
#(
  parameter int unsigned NCOLS = 4,
  parameter int unsigned K     = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCOLS-1:0]  in_valid,
  input  flit_t [NCOLS-1:0] in_flit,
  output logic [NCOLS-1:0]  in_ready,
  output logic [NCOLS-1:0]  out_valid,
  output flit_t [NCOLS-1:0] out_flit,
  input  logic [NCOLS-1:0]  out_ready
);

  typedef enum logic [1:0] {FILL, FLUSH, DRAIN, TERM} phase_e;

  phase_e phase;
  logic   seen_done;
  logic [$clog2(K+1)-1:0] count;
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

  // mesh signals, [row][cell]
  logic      cur_v [NCOLS][K];
  word_t     cur_d [NCOLS][K];
  logic      pas_v [NCOLS][K];
  word_t     pas_d [NCOLS][K];

  logic step, shift, inject, clear;

  for (genvar k = 0; k < K; k++) begin : g_k
    for (genvar r = 0; r < NCOLS; r++) begin : g_r
      // command from the row above; the top row always compares
      sort_cmd_e c_in, c_out;
      if (r == 0) begin : g_top
        assign c_in = SC_DK;
      end else begin : g_below
        assign c_in = g_k[k].g_r[r-1].c_out;
      end
      sort_cell u_cell (
        .clk, .rst_n, .clear, .step, .shift,
        .in_valid  (k == 0 ? inject             : pas_v[r][k == 0 ? 0 : k-1]),
        .in_data   (k == 0 ? buf_flit[r].data   : pas_d[r][k == 0 ? 0 : k-1]),
        .cmd_in    (c_in),
        .cmd_out   (c_out),
        .left_valid(k == 0 ? 1'b0               : cur_v[r][k == 0 ? 0 : k-1]),
        .left_data (k == 0 ? '0                 : cur_d[r][k == 0 ? 0 : k-1]),
        .cur_valid (cur_v[r][k]),
        .cur_data  (cur_d[r][k]),
        .pass_valid(pas_v[r][k]),
        .pass_data (pas_d[r][k])
      );
    end
  end

  logic any_pass, any_cur, tuple_ok, tuple_done, send_ok;

  always_comb begin
    any_pass = 1'b0;
    any_cur  = 1'b0;
    for (int k = 0; k < K; k++) begin
      any_pass |= pas_v[0][k];
      any_cur  |= cur_v[0][k];
    end
    tuple_ok   = &buf_valid;
    tuple_done = buf_flit[0].done;
    send_ok    = &was_rdy;

    step      = 1'b0;
    shift     = 1'b0;
    inject    = 1'b0;
    clear     = 1'b0;
    buf_next  = '0;
    out_valid = '0;
    out_flit  = '0;
    case (phase)
      FILL: begin
        step = 1'b1;
        if (tuple_ok) begin
          buf_next = '1;
          inject   = !tuple_done;
        end
      end
      FLUSH: step = 1'b1;
      DRAIN: begin
        if (!cur_v[0][K-1]) begin
          shift = 1'b1;
        end else if (send_ok) begin
          shift     = 1'b1;
          out_valid = '1;
          for (int r = 0; r < NCOLS; r++) out_flit[r].data = cur_d[r][K-1];
        end
      end
      TERM: begin
        if (send_ok) begin
          out_valid = '1;
          clear     = 1'b1;
          for (int r = 0; r < NCOLS; r++) out_flit[r].done = 1'b1;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= FILL;
      seen_done <= 1'b0;
      count     <= '0;
      was_rdy   <= '0;
    end else begin
      was_rdy <= out_ready;
      case (phase)
        FILL: begin
          if (tuple_ok && tuple_done) begin
            seen_done <= 1'b1;
            phase     <= (count == 0) ? TERM : FLUSH;
          end else if (inject && 32'(count) == K-1) begin
            phase <= FLUSH;
          end
          if (inject) count <= count + 1'b1;
        end
        FLUSH: if (!any_pass) phase <= DRAIN;
        DRAIN: begin
          if (!any_cur) begin
            count <= '0;
            phase <= seen_done ? TERM : FILL;
          end
        end
        TERM: begin
          if (send_ok) begin
            seen_done <= 1'b0;
            phase     <= FILL;
          end
        end
        default: phase <= FILL;
      endcase
    end
  end

  // Ready latency 1: send only in a cycle after the downstream was ready.
  a_ready_latency: assert property (@(posedge clk) disable iff (!rst_n)
    |out_valid |-> &was_rdy);

endmodule
