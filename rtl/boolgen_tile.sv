// boolgen_tile: element-wise programmable comparison.
//
// For every input pair it emits one bit, out[i] = C(in1[i], in2[i]), as a
// 32-bit word holding 0 or 1. C is one of ==, !=, <, <=, >, >= on signed
// 32-bit values. In constant mode the second input is ignored and compared
// against a runtime constant instead (the reference design's example compares a discount
// column against the constant 0.1). The reference design names the condition as
// programmable but gives no encoding; the encoding here is this design's own.
//
// Structure and timing are those of every tile: input st_buffers, registered
// downstream ready (Avalon-ST ready latency 1), one guarded combinational
// action that emits a result and pops the inputs. A terminator on the used
// inputs becomes a terminator on the output.
//
// Configuration (write port, own register map):
//   address 0: opcode, [2:0] condition (cmp_op_e), [3] compare with constant
//   address 1: signed constant [31:0]
// Both reset to 0.
module boolgen_tile
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

  cmp_op_e cond;
  logic    use_const;
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
      cond      <= CMP_EQ;
      use_const <= 1'b0;
      constant  <= '0;
      was_rdy   <= 1'b0;
    end else begin
      was_rdy <= out_ready;
      if (cfg_write) begin
        case (cfg_addr)
          2'd0: begin
            cond      <= cmp_op_e'(cfg_wdata[2:0]);
            use_const <= cfg_wdata[3];
          end
          2'd1:    constant <= cfg_wdata;
          default: ;
        endcase
      end
    end
  end

  logic input_valid, done_in;
  word_t b;

  always_comb begin
    b           = use_const ? constant : buf_flit[1].data;
    input_valid = use_const ? buf_valid[0] : &buf_valid;
    done_in     = use_const ? buf_flit[0].done : (buf_flit[0].done & buf_flit[1].done);

    out_valid = 1'b0;
    out_flit  = '0;
    buf_next  = '0;
    if (was_rdy && input_valid) begin
      out_valid     = 1'b1;
      out_flit.done = done_in;
      out_flit.data = done_in ? '0 : word_t'(compare(cond, buf_flit[0].data, b));
      buf_next[0]   = 1'b1;
      buf_next[1]   = !use_const;
    end
  end

  // Ready latency 1: send only in a cycle after the downstream was ready.
  a_ready_latency: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> was_rdy);

endmodule
