// main_match: main match block (MM), which doubles as the local priority
// encoder (LPE) of one word line.
//
// It merges the two partial match results of a word into the final match
// outputs MLout0 (column 0) and MLout1 (column 1). Column 0 has priority: when
// both columns match, only MLout0 is asserted, and MLout1 is suppressed by
// MLout0 so that its line does not swing. Active-high signals; combinational.
// Function and priority rule follow the published architecture.
module main_match (
  input  logic [1:0] ab,     // AB0, AB1 from the left PM
  input  logic [1:0] cd,     // CD0, CD1 from the right PM
  output logic [1:0] mlout   // MLout0, MLout1
);
  always_comb begin
    mlout[0] = ab[0] & cd[0];
    mlout[1] = ab[1] & cd[1] & ~mlout[0];
  end
endmodule
