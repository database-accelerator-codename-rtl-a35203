// dpu_pkg: types and constants shared by the streaming database tiles.
//
// Every link between tiles carries one flit per transfer: a 32-bit data word
// and a done bit. The 32-bit word follows the reference design (one record element is a
// 4-byte word on the Avalon-ST link); the done bit is the reference design's end-of-stream
// flag, carried there in the Avalon-ST error field. In this design a flit with
// done=1 is a terminator: it ends the stream and its data word is not an
// element (own choice, so that a tile that drops elements, such as the filter
// or the joiner, can still end its output stream).
//
// Configuration is written through a small Avalon-MM style write port on each
// tile (address, write, writedata); the opcode encodings below for the ALU follow
// the reference design, the others are this design's own.
package dpu_pkg;

  localparam int unsigned DATA_W = 32;

  typedef logic [DATA_W-1:0] word_t;

  // One stream flit (valid and ready travel beside it).
  typedef struct packed {
    logic  done;
    word_t data;
  } flit_t;

  // ALU opcodes, as listed in the reference design: bit 2 selects the constant operand.
  typedef enum logic [2:0] {
    ALU_ADD   = 3'd0,
    ALU_SUB   = 3'd1,
    ALU_MUL   = 3'd2,
    ALU_DIV   = 3'd3,
    ALU_ADD_K = 3'd4,
    ALU_SUB_K = 3'd5,
    ALU_MUL_K = 3'd6,
    ALU_DIV_K = 3'd7
  } alu_op_e;

  // Boolgen conditions (own encoding); bit 3 of the opcode selects the
  // internal constant as second operand.
  typedef enum logic [2:0] {
    CMP_EQ = 3'd0,
    CMP_NE = 3'd1,
    CMP_LT = 3'd2,
    CMP_LE = 3'd3,
    CMP_GT = 3'd4,
    CMP_GE = 3'd5
  } cmp_op_e;

  // Aggregator functions (own encoding). AGG_NOP emits the first element of
  // each group, which with the group column on both inputs lists the groups.
  typedef enum logic [2:0] {
    AGG_NOP   = 3'd0,
    AGG_COUNT = 3'd1,
    AGG_SUM   = 3'd2,
    AGG_MIN   = 3'd3,
    AGG_MAX   = 3'd4,
    AGG_AVG   = 3'd5
  } agg_op_e;

  // Commands passed down a column of sorter cells.
  typedef enum logic [1:0] {
    SC_PASS = 2'd0,  // keep the held element, pass the incoming one
    SC_SWAP = 2'd1,  // keep the incoming element, pass the held one
    SC_DK   = 2'd2   // equal so far: the row below decides
  } sort_cmd_e;

  // Signed comparison used by boolgen.
  function automatic logic compare(cmp_op_e op, word_t a, word_t b);
    case (op)
      CMP_EQ:  return a == b;
      CMP_NE:  return a != b;
      CMP_LT:  return $signed(a) <  $signed(b);
      CMP_LE:  return $signed(a) <= $signed(b);
      CMP_GT:  return $signed(a) >  $signed(b);
      CMP_GE:  return $signed(a) >= $signed(b);
      default: return 1'b0;
    endcase
  endfunction

  // Signed division with a defined result for a zero divisor (0) and for the
  // one overflowing case (most negative / -1 wraps to the most negative).
  function automatic word_t sdiv(word_t a, word_t b);
    if (b == '0) return '0;
    if (a == {1'b1, {(DATA_W-1){1'b0}}} && b == '1) return a;
    return word_t'($signed(a) / $signed(b));
  endfunction

endpackage
