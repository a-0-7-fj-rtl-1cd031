// partial_match: partial match block (PM) between two cell blocks.
//
// A word is split into four cell blocks evaluated in parallel (sub-match line
// scheme). A PM merges the column-0 and column-1 results of two neighbouring
// cell blocks (A,B or C,D) into the partial match lines AB0/AB1 (CD0/CD1): a
// partial line reports a match only when both cell blocks match in that
// column. Match signals are active high; combinational. The function follows
// the published architecture; its precharged dynamic circuit is not modelled.
module partial_match (
  input  logic [1:0] x,   // column 0/1 match of the left cell block (A or C)
  input  logic [1:0] y,   // column 0/1 match of the right cell block (B or D)
  output logic [1:0] xy   // partial match lines (AB0,AB1) or (CD0,CD1)
);
  always_comb xy = x & y;
endmodule
