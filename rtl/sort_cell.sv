// sort_cell: one processing element of the sorter mesh.
//
// The cell holds one element (cur). On a step with an incoming element it
// either keeps the incoming element and passes the held one to the right
// (SWAP), or keeps the held one and passes the incoming one (PASS). In a chain
// of K cells fed one element per step, cell 0 ends up with the largest
// element, cell 1 with the second largest, and so on (the reference design's pipeline
// of sort elements: "if incoming > cur, send cur and keep incoming, else send
// incoming").
//
// Cells are stacked into a mesh, one row per column of the table. The decision
// is shared down a column of cells through cmd_in/cmd_out: a row that receives
// SWAP or PASS from above follows it; a row that receives DK (don't know:
// the rows above hold elements equal to the incoming ones) compares its own
// elements, SWAP if incoming > cur, PASS if smaller, DK if equal. The top row
// is fed DK, so it always compares. An empty cell always takes the incoming
// element. If all rows are equal the cell passes; the result is the same.
// cmd_out is combinational in cmd_in, so a column of R cells is a chain of R
// comparators within one cycle.
//
// step: process the element presented at in_valid/in_data (bubble if
// in_valid=0); the passed element appears at pass_valid/pass_data after the
// clock edge. shift: instead of stepping, load cur from the left neighbour
// (left_valid/left_data); used to unload the sorted block. clear empties the
// cell. Comparison is signed.
module sort_cell
  import dpu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      step,
  input  logic      shift,
  input  logic      in_valid,
  input  word_t     in_data,
  input  sort_cmd_e cmd_in,
  output sort_cmd_e cmd_out,
  input  logic      left_valid,
  input  word_t     left_data,
  output logic      cur_valid,
  output word_t     cur_data,
  output logic      pass_valid,
  output word_t     pass_data
);

  always_comb begin
    if (!cur_valid)                              cmd_out = SC_SWAP;
    else if (cmd_in != SC_DK)                    cmd_out = cmd_in;
    else if ($signed(in_data) > $signed(cur_data)) cmd_out = SC_SWAP;
    else if ($signed(in_data) < $signed(cur_data)) cmd_out = SC_PASS;
    else                                         cmd_out = SC_DK;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      cur_valid  <= 1'b0;
      cur_data   <= '0;
      pass_valid <= 1'b0;
      pass_data  <= '0;
    end else if (shift) begin
      cur_valid  <= left_valid;
      cur_data   <= left_data;
      pass_valid <= 1'b0;
    end else if (step) begin
      if (!in_valid) begin
        pass_valid <= 1'b0;
      end else if (cmd_out == SC_SWAP) begin
        cur_valid  <= 1'b1;
        cur_data   <= in_data;
        pass_valid <= cur_valid;
        pass_data  <= cur_data;
      end else begin
        pass_valid <= 1'b1;
        pass_data  <= in_data;
      end
    end
  end

endmodule
