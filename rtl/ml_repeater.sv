// ml_repeater: match line repeater (MLRPT) placed after every nine NAND cells.
//
// In the circuit, PCG# precharges both the input and output match nodes; in
// evaluation an arriving match signal on the input turns on a pull-down that
// discharges the output node, restarting the match signal at full swing for the
// next nine cells. A mismatch leaves both nodes at their precharge level.
// Here the match signal is active high: `ml_out` carries a match only during
// evaluation (`eval`) and only if `ml_in` carries one; outside evaluation the
// output rests at the precharge (no-match) level. Purely combinational.
// The nine-cell spacing and the repeater's behaviour follow the published
// architecture; reducing the circuit to this gate is this design's modelling.
module ml_repeater (
  input  logic eval,    // evaluation phase of the owning bank (PCG# released)
  input  logic ml_in,   // match signal from the preceding nine cells
  output logic ml_out   // regenerated match signal to the next nine cells
);
  always_comb ml_out = eval & ml_in;
endmodule
