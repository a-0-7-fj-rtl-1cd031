// nand_bank: a NAND-type TCAM bank, used both as a sub-bank (W = m-k = 136)
// and as the extra bank (W = m = 144).
//
// The bank holds WORDS word blocks of two columns, i.e. 2*WORDS entries, and
// produces one match output per entry: ml[2*w] is column 0 and ml[2*w+1] is
// column 1 of word line w (ML0, ML1 on WL0, and so on). Within a word column 0
// has priority over column 1; there is no priority between word lines.
//
// Timing (hidden bank selection). The clock high phase is the PCG high phase:
// during it the main bank evaluates while this bank precharges. At the falling
// edge the bank samples its enable `ben`. If the cycle is a search and the
// bank is enabled, the I/O block drives the search lines with `key` and the
// match chains evaluate during the low phase; the match outputs are captured
// at the next rising edge into `ml_q`. A disabled bank keeps its search lines
// unchanged and its chains are never started, so all its match outputs read
// "no match". A write (`wr`) to this bank is selected the same way, through
// `ben` sampled at the falling edge, and changes one column of one word at
// the following rising edge. `rd_val`/`rd_dc` show the addressed entry
// combinationally.
//
// What follows the published architecture: the word-block organisation, two columns per
// word line with column-decoded access, search lines driven only in the
// selected bank, one-cycle search latency. The mapping of the precharge and
// evaluation phases to the two clock edges is this design's choice.
module nand_bank
  import tcam_pkg::*;
#(
  parameter int unsigned W     = 144,
  parameter int unsigned WORDS = N_WL,
  parameter int unsigned SPAN  = RPT_SPAN,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic               clk,
  input  logic               ben,     // bank enable from the main bank
  input  logic               search,  // current cycle is a search
  input  logic               wr,      // current cycle is a write
  input  logic [W-1:0]       key,     // search data for this bank
  input  logic [AW-1:0]      wl,      // word line address
  input  logic               col,     // column address
  input  logic [W-1:0]       wval,
  input  logic [W-1:0]       wdc,
  output logic [2*WORDS-1:0] ml_q,    // registered match outputs
  output logic               active,  // bank evaluated in this cycle
  output logic [W-1:0]       rd_val,
  output logic [W-1:0]       rd_dc
);
  logic [W-1:0]       sl_q;     // search lines
  logic               eval_q;   // bank evaluates in the low phase
  logic               sel_q;    // bank selected for a write
  logic [2*WORDS-1:0] ml;
  logic [W-1:0]       wb_val [WORDS];
  logic [W-1:0]       wb_dc  [WORDS];

  always_ff @(negedge clk) begin
    eval_q <= ben & search;
    sel_q  <= ben & wr;
    if (ben && search) sl_q <= key;
  end

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    word_block #(.W(W), .SPAN(SPAN)) u_wb (
      .clk    (clk),
      .eval   (eval_q),
      .sl     (sl_q),
      .mlout  (ml[2*w +: 2]),
      .we     (sel_q && (wl == AW'(w))),
      .col    (col),
      .wval   (wval),
      .wdc    (wdc),
      .rd_val (wb_val[w]),
      .rd_dc  (wb_dc[w])
    );
  end

  always_comb begin
    rd_val = wb_val[wl];
    rd_dc  = wb_dc[wl];
  end

  assign active = eval_q;

  always_ff @(posedge clk) ml_q <= ml;
endmodule
