// word_block: one word line of a NAND bank, two columns wide.
//
// A W-bit word is cut into four cell blocks A..D of W/4 bits (search bits
// 0..W/4-1 go to A, the next quarter to B, and so on). The four blocks search
// in parallel (sub-match lines). Partial match block PM_AB merges A and B,
// PM_CD merges C and D, and the main match block MM merges the two into
// MLout0/MLout1 with column 0 taking priority. Writes and reads are column
// decoded by `col`; a write changes the whole W-bit word of one column at the
// rising clock edge. Search is combinational.
//
// The four-block split, the PM/MM structure and the column-0 priority follow
// the published architecture. Equal quarters for W = 136 (34 bits each) are this
// design's choice.
module word_block
  import tcam_pkg::*;
#(
  parameter int unsigned W    = 144,
  parameter int unsigned SPAN = RPT_SPAN
) (
  input  logic         clk,
  input  logic         eval,
  input  logic [W-1:0] sl,
  output logic [1:0]   mlout,    // MLout0 (column 0), MLout1 (column 1)
  input  logic         we,
  input  logic         col,
  input  logic [W-1:0] wval,
  input  logic [W-1:0] wdc,
  output logic [W-1:0] rd_val,
  output logic [W-1:0] rd_dc
);
  localparam int unsigned CBW = W / 4;

  logic [1:0] cb_match [4];
  logic [1:0] ab, cd;

  for (genvar i = 0; i < 4; i++) begin : g_cb
    nand_cell_block #(.CBW(CBW), .SPAN(SPAN)) u_cb (
      .clk    (clk),
      .eval   (eval),
      .sl     (sl[i*CBW +: CBW]),
      .match  (cb_match[i]),
      .we     (we),
      .col    (col),
      .wval   (wval[i*CBW +: CBW]),
      .wdc    (wdc[i*CBW +: CBW]),
      .rd_val (rd_val[i*CBW +: CBW]),
      .rd_dc  (rd_dc[i*CBW +: CBW])
    );
  end

  partial_match u_pm_ab (.x(cb_match[0]), .y(cb_match[1]), .xy(ab));
  partial_match u_pm_cd (.x(cb_match[2]), .y(cb_match[3]), .xy(cd));
  main_match    u_mm    (.ab(ab), .cd(cd), .mlout(mlout));

  initial assert (W % 4 == 0) else $error("word_block: W must be a multiple of 4");
endmodule
