// nand_cell_block: one cell block of a NAND-type TCAM word line.
//
// The block holds CBW ternary cells in each of the two columns of a word line
// (36 x 2 in the 144-bit bank). The two columns are interleaved in the array
// and each has its own match chain. A chain starts at a starter that injects
// the match signal when the bank evaluates, then runs through the NAND cells
// in series: each cell passes the signal only if it is don't-care or equals its
// search-line bit. After every SPAN (nine) cells a match line repeater
// regenerates the signal, so a 36-cell chain carries three repeaters.
//
// Each cell stores a value bit and a don't-care bit (two 6T SRAM cells in the
// circuit). Write and read are column decoded: `col` picks the column that a
// write changes and that `rd_val`/`rd_dc` return. Writes take effect at the
// rising clock edge; search and read are combinational. The cells have no
// reset, like the SRAM they model.
//
// The cell circuit, the nine-cell repeater spacing and the 36 x 2 block size
// follow the published architecture. Splitting a chain whose length is not a multiple
// of nine puts the short segment last; that is this design's choice.
module nand_cell_block
  import tcam_pkg::*;
#(
  parameter int unsigned CBW  = 36,  // cells per column
  parameter int unsigned SPAN = RPT_SPAN  // cells between match line repeaters
) (
  input  logic           clk,
  // search
  input  logic           eval,       // bank enabled and searching
  input  logic [CBW-1:0] sl,         // search-line bits for this block
  output logic [1:0]     match,      // chain result of column 0 / column 1
  // column-decoded read/write
  input  logic           we,         // write this word line
  input  logic           col,        // column address (LSB of the address)
  input  logic [CBW-1:0] wval,
  input  logic [CBW-1:0] wdc,
  output logic [CBW-1:0] rd_val,
  output logic [CBW-1:0] rd_dc
);
  localparam int unsigned NSEG = (CBW + SPAN - 1) / SPAN;  // chain segments
  localparam int unsigned NRPT = NSEG - 1;                  // repeaters per chain

  logic [CBW-1:0] val [2];
  logic [CBW-1:0] dc  [2];

  always_ff @(posedge clk) begin
    if (we) begin
      val[col] <= wval;
      dc[col]  <= wdc;
    end
  end

  always_comb begin
    rd_val = val[col];
    rd_dc  = dc[col];
  end

  for (genvar c = 0; c < 2; c++) begin : g_col
    logic [CBW-1:0]  pass;
    logic [NSEG-1:0] seg_in, seg_out;

    for (genvar b = 0; b < CBW; b++) begin : g_cell
      assign pass[b] = cell_pass(val[c][b], dc[c][b], sl[b]);
    end

    assign seg_in[0] = eval;  // starter block
    for (genvar s = 0; s < NSEG; s++) begin : g_seg
      localparam int unsigned LO = s * SPAN;
      localparam int unsigned HI = ((s + 1) * SPAN < CBW) ? (s + 1) * SPAN - 1 : CBW - 1;
      assign seg_out[s] = seg_in[s] & (&pass[HI:LO]);
      if (s < NRPT) begin : g_rpt
        ml_repeater u_rpt (.eval(eval), .ml_in(seg_out[s]), .ml_out(seg_in[s+1]));
      end
    end
    assign match[c] = seg_out[NSEG-1];
  end
endmodule
