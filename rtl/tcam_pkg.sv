// tcam_pkg: types and constants shared by the hybrid TCAM.
//
// A ternary cell holds two bits, as in the two-SRAM NAND cell: `val` is the
// stored binary value and `dc` marks "don't care" (dc = 1 matches any search
// bit). The search key itself is binary. The sizes below are those of the
// 144-kb test chip: a 144-bit search word split into an 8-bit merged field
// (MF, held in the NOR main bank) and a 136-bit individual field (IF, held in
// one of three NAND sub-banks); entries that share no MF go to a 144-bit
// extra bank. Every NAND bank has 128 word lines of two columns each.
package tcam_pkg;

  localparam int unsigned M_BITS    = 144;  // full search width m
  localparam int unsigned K_BITS    = 8;    // merged-field width k
  localparam int unsigned N_SUBBANK = 3;    // number of sub-banks
  localparam int unsigned N_WL      = 128;  // word lines per NAND bank
  localparam int unsigned RPT_SPAN  = 9;    // NAND cells between repeaters

  // Operation presented on the command port.
  typedef enum logic [1:0] {
    OP_NOP    = 2'd0,
    OP_SEARCH = 2'd1,
    OP_WRITE  = 2'd2,
    OP_READ   = 2'd3
  } op_e;

  // Pass condition of one NAND ternary cell: the pass transistor conducts
  // when the cell is don't-care or its value equals the search-line bit.
  function automatic logic cell_pass(logic val, logic dc, logic sl);
    return dc | (val ~^ sl);
  endfunction

endpackage
