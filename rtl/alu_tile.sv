// alu_tile: element-wise arithmetic on two streamed columns.
//
// For every input pair it produces out[i] = f(in1[i], in2[i]), or
// f(in1[i], K) with the runtime constant K, where f is add, subtract, multiply
// or divide. The eight opcodes (0..3 two columns, 4..7 column and constant)
// are the reference design's. Overflow is not detected: results wrap to 32 bits. A zero
// divisor gives 0 (own choice: the reference design leaves it to software).
//
// Structure, as for every tile: each input passes through an st_buffer; the
// downstream ready is registered (was_rdy), so the tile sends only in a cycle
// after the sink was ready (Avalon-ST ready latency 1) and no combinational
// path leads from the output ready back to the inputs. The tile logic is one
// guarded action: when every used input holds a flit and was_rdy is set, it
// emits the result combinationally and pops the used inputs. A done flag is
// forwarded with the result, so a terminator on both inputs (on the first
// only, in constant mode) becomes a terminator on the output.
//
// Configuration (Avalon-MM style write port, own register map):
//   address 0: opcode [2:0]   address 1: signed constant [31:0]
// Both reset to 0 (two-column addition).
module alu_tile
  import dpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // configuration writes
  input  logic        cfg_write,
  input  logic [1:0]  cfg_addr,
  input  word_t       cfg_wdata,
  // two Avalon-ST sinks
  input  logic [1:0]  in_valid,
  input  flit_t [1:0] in_flit,
  output logic [1:0]  in_ready,
  // one Avalon-ST source
  output logic        out_valid,
  output flit_t       out_flit,
  input  logic        out_ready
);

  alu_op_e op;
  word_t   constant;
  logic    was_rdy;

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
    if (!rst_n) begin
      op       <= ALU_ADD;
      constant <= '0;
      was_rdy  <= 1'b0;
    end else begin
      was_rdy <= out_ready;
      if (cfg_write) begin
        case (cfg_addr)
          2'd0:    op       <= alu_op_e'(cfg_wdata[2:0]);
          2'd1:    constant <= cfg_wdata;
          default: ;
        endcase
      end
    end
  end

  logic  use_const, input_valid, done_in;
  word_t a, b, result;

  always_comb begin
    use_const   = op[2];
    a           = buf_flit[0].data;
    b           = use_const ? constant : buf_flit[1].data;
    input_valid = use_const ? buf_valid[0] : &buf_valid;
    done_in     = use_const ? buf_flit[0].done : (buf_flit[0].done & buf_flit[1].done);

    case (op[1:0])
      2'b00:   result = a + b;
      2'b01:   result = a - b;
      2'b10:   result = word_t'($signed(a) * $signed(b));
      default: result = sdiv(a, b);
    endcase

    out_valid = 1'b0;
    out_flit  = '0;
    buf_next  = '0;
    if (was_rdy && input_valid) begin
      out_valid     = 1'b1;
      out_flit.done = done_in;
      out_flit.data = done_in ? '0 : result;
      buf_next[0]   = 1'b1;
      buf_next[1]   = !use_const;
    end
  end

  // Ready latency 1: send only in a cycle after the downstream was ready.
  a_ready_latency: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> was_rdy);

endmodule
