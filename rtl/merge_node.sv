// merge_node: one comparator node of the merge-sort tree.
//
// The node holds one register. When its parent asserts load, the register
// takes the larger of the two child registers and the node asserts read1 or
// read2 so that the child that supplied the value fetches a new one in the
// same clock; the request thus ripples combinationally from the root down to a
// leaf, and every register on that path updates at the same edge.
//
// Two key values are reserved, as in the document's node: all-ones marks a
// register that has not been filled yet, and 0 marks an exhausted leaf. A
// child holding all-ones is always asked to load, so the all-ones markers that
// reset leaves in the tree rise out of it one level per read. When both
// children hold all-ones the node holds all-ones whether or not it is loaded.
// Ties go to the right child. Reset is synchronous and sets all-ones.
//
// Interface: load (from the parent), in1/in2 (child registers), read1/read2
// (to the children, combinational), out (this node's register).
module merge_node #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [DW-1:0] in1,
  input  logic [DW-1:0] in2,
  output logic          read1,
  output logic          read2,
  output logic [DW-1:0] out
);

  logic empty1, empty2, left_wins;

  assign empty1    = &in1;
  assign empty2    = &in2;
  assign left_wins = in1 > in2;

  assign read1 = load && (left_wins || empty1);
  assign read2 = load && (!left_wins || empty2);

  always_ff @(posedge clk) begin
    if (rst)
      out <= '1;
    else if (empty1 && empty2)
      out <= '1;
    else if (load)
      out <= left_wins ? in1 : in2;
  end

endmodule
