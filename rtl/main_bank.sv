// main_bank: the NOR-type main bank that selects which NAND bank searches.
//
// It holds N_SUB merged-field (MF) words, one per sub-bank; word n belongs to
// word line WL_n and sub-bank n (n = 1..N_SUB). WL_0 belongs to the extra bank
// and has no NOR word. The outputs ben[n] are the bank enables BEN_n, with
// ben[0] being BEN_E of the extra bank.
//
//  - Search (`search` high): BEN_n follows the match line of MF word n, and
//    BEN_E is raised when no MF word matches, so the search falls through to
//    the extra bank.
//  - Read or write (`search` low): BEN follows the word lines `wl`, so the
//    main-bank word line also selects its sub-bank (or, for WL_0, the extra
//    bank). `mf_we` lets the selected MF word be written as well.
//
// All of this is combinational apart from the MF storage, which is written at
// the rising clock edge. In the hybrid timing the main bank evaluates during
// the high clock phase and the NAND banks sample BEN at the falling edge.
// The word-line/match-line selection and the extra-bank fall-through follow
// the published architecture. More than one BEN_n can rise if overlapping ternary MFs
// are stored; the design does not prevent that.
module main_bank
  import tcam_pkg::*;
#(
  parameter int unsigned K     = K_BITS,
  parameter int unsigned N_SUB = N_SUBBANK
) (
  input  logic             clk,
  input  logic             search,   // evaluate match lines rather than word lines
  input  logic [K-1:0]     key,      // MF part of the search data
  input  logic [N_SUB:0]   wl,       // one-hot word lines; wl[0] is the extra bank
  input  logic             mf_we,    // write the MF word on the active word line
  input  logic [K-1:0]     wval,
  input  logic [K-1:0]     wdc,
  output logic [N_SUB:0]   ben,      // ben[0] = BEN_E, ben[n] = BEN_n
  output logic [N_SUB:1]   ml,       // match lines of the MF words
  output logic [K-1:0]     rd_val,   // MF word on the active word line
  output logic [K-1:0]     rd_dc
);
  logic [K-1:0] w_val [N_SUB+1];
  logic [K-1:0] w_dc  [N_SUB+1];

  assign w_val[0] = '0;
  assign w_dc[0]  = '0;

  for (genvar n = 1; n <= N_SUB; n++) begin : g_word
    nor_tcam_word #(.K(K)) u_word (
      .clk    (clk),
      .we     (mf_we & wl[n]),
      .wval   (wval),
      .wdc    (wdc),
      .key    (key),
      .ml     (ml[n]),
      .rd_val (w_val[n]),
      .rd_dc  (w_dc[n])
    );
  end

  always_comb begin
    if (search) ben = {ml, ~|ml};
    else        ben = wl;
    rd_val = '0;
    rd_dc  = '0;
    for (int n = 1; n <= N_SUB; n++) begin
      if (wl[n]) begin
        rd_val = w_val[n];
        rd_dc  = w_dc[n];
      end
    end
  end
endmodule
