// hybrid_tcam: hybrid NOR/NAND ternary CAM with hidden bank selection.
//
// Idea. Sorted lookup tables (for example IPv4 prefixes) share a small set of
// leading bits. The first K bits of an M-bit entry, the merged field (MF), are
// stored once per group in a small, fast NOR-type main bank; the remaining
// M-K bits, the individual field (IF), are stored in a low-power NAND-type
// sub-bank that belongs to that MF. Entries whose MF is not shared go whole
// into a NAND extra bank. A search first matches the MF in the main bank
// (coarse search); the matching main-bank word enables its sub-bank, or the
// extra bank if no MF matches, and only that one NAND bank drives its search
// lines and evaluates (fine search).
//
// Timing. Commands are registered at a rising edge (t0). During the high clock
// phase (PCG high) the main bank evaluates while the NAND banks precharge; at
// the falling edge the bank enables are sampled and the selected NAND bank
// evaluates in the low phase; its match outputs are registered at the next
// rising edge (t1). A search presented before t0 therefore has its result in
// `ml_sub`/`ml_extra` after t1, with `srch_valid` high: one clock of latency,
// one search per clock. Writes and reads take the same single cycle;
// `rd_valid` marks read data after t1.
//
// Interface. addr = {msb, word line, column}: msb 0 is the extra bank, msb n
// is sub-bank n. A sub-bank entry is M bits whose upper K bits are the MF
// (written only when the MSB address changes, see tcam_ctrl) and whose lower
// M-K bits are the IF. Ternary data is given as value `wval` and don't-care
// `wdc`. Each NAND bank reports 2*WORDS match lines, bit 2w for column 0 and
// bit 2w+1 for column 1 of word line w; within a word line column 0 wins.
// `ben_q` gives the bank enables behind the reported result
// (bit 0 extra bank, bit n sub-bank n).
//
// Sizes default to the 144-kb test chip: M = 144, K = 8, three sub-banks and
// 128 word lines x 2 columns per bank. The bank organisation, the MF/IF split,
// the extra-bank fall-through and the one-clock hidden bank selection follow the
// published architecture. Mapping precharge and evaluation onto
// the two clock phases and the command interface are this design's choices.
module hybrid_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned M     = M_BITS,
  parameter int unsigned K     = K_BITS,
  parameter int unsigned N_SUB = N_SUBBANK,
  parameter int unsigned WORDS = N_WL,
  localparam int unsigned MSBW = $clog2(N_SUB + 1),
  localparam int unsigned AW   = $clog2(WORDS),
  localparam int unsigned ADW  = MSBW + AW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  op_e                  op,
  input  logic [ADW-1:0]       addr,
  input  logic [M-1:0]         key,
  input  logic [M-1:0]         wval,
  input  logic [M-1:0]         wdc,
  output logic [2*WORDS-1:0]   ml_sub [N_SUB],  // index n-1 is sub-bank n
  output logic [2*WORDS-1:0]   ml_extra,
  output logic [N_SUB:0]       ben_q,
  output logic                 srch_valid,
  output logic [M-1:0]         rd_val,
  output logic [M-1:0]         rd_dc,
  output logic                 rd_valid,
  output logic [N_SUB:0]       bank_eval   // NAND banks evaluating this cycle
);
  op_e              op_q;
  logic [ADW-1:0]   addr_q;
  logic [M-1:0]     key_q, wval_q, wdc_q;

  logic [MSBW-1:0]  msb;
  logic [AW-1:0]    wl_addr;
  logic             col;
  logic [N_SUB:0]   wl;
  logic             mf_we;
  logic [N_SUB:0]   ben, ben_r;
  logic [N_SUB:1]   mf_ml;
  logic [K-1:0]     mf_rd_val, mf_rd_dc;
  logic             search, wr;

  logic [M-K-1:0]   sub_rd_val [N_SUB];
  logic [M-K-1:0]   sub_rd_dc  [N_SUB];
  logic [M-1:0]     ext_rd_val, ext_rd_dc;

  // command register (search-data and address latches)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) op_q <= OP_NOP;
    else        op_q <= op;
  end
  always_ff @(posedge clk) begin
    addr_q <= addr;
    key_q  <= key;
    wval_q <= wval;
    wdc_q  <= wdc;
  end

  assign {msb, wl_addr, col} = addr_q;
  assign search = (op_q == OP_SEARCH);
  assign wr     = (op_q == OP_WRITE);

  tcam_ctrl #(.N_SUB(N_SUB)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .op    (op_q),
    .msb   (msb),
    .wl    (wl),
    .mf_we (mf_we)
  );

  main_bank #(.K(K), .N_SUB(N_SUB)) u_main (
    .clk    (clk),
    .search (search),
    .key    (key_q[M-1 -: K]),
    .wl     (wl),
    .mf_we  (mf_we),
    .wval   (wval_q[M-1 -: K]),
    .wdc    (wdc_q[M-1 -: K]),
    .ben    (ben),
    .ml     (mf_ml),
    .rd_val (mf_rd_val),
    .rd_dc  (mf_rd_dc)
  );

  for (genvar n = 1; n <= N_SUB; n++) begin : g_sub
    nand_bank #(.W(M - K), .WORDS(WORDS)) u_sub (
      .clk    (clk),
      .ben    (ben[n]),
      .search (search),
      .wr     (wr),
      .key    (key_q[M-K-1:0]),
      .wl     (wl_addr),
      .col    (col),
      .wval   (wval_q[M-K-1:0]),
      .wdc    (wdc_q[M-K-1:0]),
      .ml_q   (ml_sub[n-1]),
      .active (bank_eval[n]),
      .rd_val (sub_rd_val[n-1]),
      .rd_dc  (sub_rd_dc[n-1])
    );
  end

  nand_bank #(.W(M), .WORDS(WORDS)) u_extra (
    .clk    (clk),
    .ben    (ben[0]),
    .search (search),
    .wr     (wr),
    .key    (key_q),
    .wl     (wl_addr),
    .col    (col),
    .wval   (wval_q),
    .wdc    (wdc_q),
    .ml_q   (ml_extra),
    .active (bank_eval[0]),
    .rd_val (ext_rd_val),
    .rd_dc  (ext_rd_dc)
  );

  // bank enables as the NAND banks saw them (falling edge)
  always_ff @(negedge clk) ben_r <= ben;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      srch_valid <= 1'b0;
      rd_valid   <= 1'b0;
      ben_q      <= '0;
    end else begin
      srch_valid <= search;
      rd_valid   <= (op_q == OP_READ);
      ben_q      <= search ? ben_r : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (op_q == OP_READ) begin
      if (msb == '0) begin
        rd_val <= ext_rd_val;
        rd_dc  <= ext_rd_dc;
      end else begin
        for (int n = 1; n <= N_SUB; n++) begin
          if (msb == MSBW'(n)) begin
            rd_val <= {mf_rd_val, sub_rd_val[n-1]};
            rd_dc  <= {mf_rd_dc,  sub_rd_dc[n-1]};
          end
        end
      end
    end
  end

  // Only one NAND bank may evaluate in a cycle (the power saving of the scheme)
  // unless overlapping ternary MFs were stored.
  a_bank_select: assert property (@(posedge clk) disable iff (!rst_n)
    search |-> ben != '0)
    else $error("hybrid_tcam: search with no bank enabled");
  a_extra_fallback: assert property (@(posedge clk) disable iff (!rst_n)
    search |-> ben[0] == ~|mf_ml)
    else $error("hybrid_tcam: extra bank enable does not follow the MF match lines");
endmodule
