// st_buffer: two-slot input buffer (a relay station) placed at every tile input.
//
// The upstream side is an Avalon-ST sink with ready latency 1: a flit offered
// with in_valid in cycle t is only sent because in_ready was high in cycle t-1.
// The downstream side offers the oldest held flit to the tile logic with
// out_valid; the tile pulses `next` in the cycle it consumes that flit.
//
// Three states, as in the reference design's state diagram:
//   EMPTY     : out_valid=0, in_ready=1. An arriving flit goes to the main slot.
//   MAIN_FULL : out_valid=1, in_ready=!(in_valid & !next). A flit that arrives
//               while the tile does not consume is parked in the aux slot.
//   AUX_FULL  : out_valid=1, in_ready=0. When the tile consumes, the aux flit
//               moves to the main slot.
// In steady streaming only the main slot is used; the aux slot absorbs the one
// flit a ready-latency-1 source may still send after the buffer stops being
// ready. in_ready never depends on the downstream ready of the tile, so no
// combinational path runs backwards through a chain of tiles.
// Reset (synchronous, active low) empties the buffer. An arrival while in
// AUX_FULL without a consume would overflow; the protocol excludes it and an
// assertion checks it.
module st_buffer
  import dpu_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // Avalon-ST sink, ready latency 1
  input  logic  in_valid,
  input  flit_t in_flit,
  output logic  in_ready,
  // to the tile logic
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  next
);

  typedef enum logic [1:0] {EMPTY, MAIN_FULL, AUX_FULL} state_e;

  state_e state;
  flit_t  main_q, aux_q;

  assign out_valid = (state != EMPTY);
  assign out_flit  = main_q;

  always_comb begin
    case (state)
      EMPTY:     in_ready = 1'b1;
      MAIN_FULL: in_ready = !(in_valid && !next);
      default:   in_ready = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= EMPTY;
      main_q <= '0;
      aux_q  <= '0;
    end else begin
      case (state)
        EMPTY: begin
          if (in_valid) begin
            main_q <= in_flit;
            state  <= MAIN_FULL;
          end
        end
        MAIN_FULL: begin
          if (in_valid && next) begin
            main_q <= in_flit;
          end else if (in_valid && !next) begin
            aux_q <= in_flit;
            state <= AUX_FULL;
          end else if (!in_valid && next) begin
            state <= EMPTY;
          end
        end
        AUX_FULL: begin
          if (next) begin
            main_q <= aux_q;
            if (in_valid) aux_q <= in_flit;
            else          state <= MAIN_FULL;
          end
        end
        default: state <= EMPTY;
      endcase
    end
  end

  // A ready-latency-1 source never sends into a full buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(state == AUX_FULL && in_valid && !next));

endmodule
