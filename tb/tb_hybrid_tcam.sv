// tb_hybrid_tcam: end-to-end test of the hybrid TCAM at its default size
// (144-bit entries, 8-bit MF, three sub-banks and an extra bank of 256 entries
// each). It loads a routing-table-like data set: three groups of entries
// sharing an MF (143, 203 and 201), each group in its own sub-bank, and 256
// entries with other leading bytes in the extra bank. Entries carry don't-care
// tails like address prefixes, and some are duplicated so that several word
// lines, or both columns of one word line, match at once.
//
// A reference model kept here follows the same rules: MF match selects the
// sub-bank, no MF match selects the extra bank, the MF of a sub-bank is only
// written when the MSB address changes between writes, column 0 wins within
// a word line. Searches are issued back to back, one per clock, and every
// result must appear exactly one clock later. The test counts how often each
// mechanism occurs and fails if one never does.
module tb_hybrid_tcam;
  import tcam_pkg::*;
  localparam int M = 144, K = 8, NS = 3, WORDS = 128, N = 2 * WORDS;
  localparam int IFW = M - K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  op_e op;
  logic [9:0] addr;
  logic [M-1:0] key, wval, wdc, rd_val, rd_dc;
  logic [N-1:0] ml_sub [NS];
  logic [N-1:0] ml_extra;
  logic [NS:0] ben_q, bank_eval;
  logic srch_valid, rd_valid;

  hybrid_tcam dut (.clk(clk), .rst_n(rst_n), .op(op), .addr(addr), .key(key), .wval(wval), .wdc(wdc),
    .ml_sub(ml_sub), .ml_extra(ml_extra), .ben_q(ben_q), .srch_valid(srch_valid),
    .rd_val(rd_val), .rd_dc(rd_dc), .rd_valid(rd_valid), .bank_eval(bank_eval));

  // ---------------- reference model
  logic [K-1:0]   mf_val [NS+1], mf_dc [NS+1];
  logic [IFW-1:0] s_val [NS+1][N], s_dc [NS+1][N];   // index 1..NS
  logic [M-1:0]   e_val [N], e_dc [N];
  logic [1:0]     last_msb;
  logic           have_last;

  // expected outputs of the command in flight
  typedef struct {
    logic          valid_s, valid_r;
    logic [NS:0]   ben;
    logic [N-1:0]  ml [NS+1];      // 0 = extra bank
    logic [M-1:0]  rv, rdc;
    int            due;            // clock edge at which the result is out
  } exp_t;
  exp_t exp_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_sub_hit [NS+1];
  int n_extra_fall = 0, n_prio = 0, n_multi = 0, n_bank_miss = 0, n_mf_kept = 0, n_mf_written = 0;
  int n_read_sub = 0, n_read_ext = 0, n_dc_mf = 0, n_back2back = 0, n_wr_then_search = 0;

  function automatic logic tmatch(logic [M-1:0] v, logic [M-1:0] d, logic [M-1:0] k);
    return (((v ^ k) & ~d) == '0);
  endfunction

  function automatic logic [M-1:0] rnd();
    return M'({$urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  // prefix-style don't-care mask: the lowest `len` bits are don't care
  function automatic logic [M-1:0] tail_dc(int len);
    return (len <= 0) ? '0 : ({M{1'b1}} >> (M - len));
  endfunction

  function automatic exp_t model_search(logic [M-1:0] k);
    exp_t x;
    logic [N-1:0] r;
    x.valid_s = 1; x.valid_r = 0; x.rv = '0; x.rdc = '0;
    x.ben = '0;
    for (int n = 1; n <= NS; n++) x.ben[n] = tmatch({{IFW{1'b0}}, mf_val[n]}, {{IFW{1'b0}}, mf_dc[n]}, {{IFW{1'b0}}, k[M-1 -: K]});
    x.ben[0] = (x.ben[NS:1] == '0);
    for (int b = 0; b <= NS; b++) begin
      r = '0;
      if (x.ben[b]) begin
        for (int e = 0; e < N; e++)
          r[e] = (b == 0) ? tmatch(e_val[e], e_dc[e], k)
                          : tmatch({{K{1'b0}}, s_val[b][e]}, {{K{1'b0}}, s_dc[b][e]}, {{K{1'b0}}, k[IFW-1:0]});
        for (int w = 0; w < WORDS; w++) if (r[2*w]) begin
          if (r[2*w+1]) n_prio++;
          r[2*w+1] = 1'b0;
        end
      end
      x.ml[b] = r;
    end
    return x;
  endfunction

  // ---------------- command issue; one command per clock
  task automatic issue(op_e o, logic [9:0] a, logic [M-1:0] k, logic [M-1:0] v, logic [M-1:0] d);
    exp_t x;
    logic [1:0] msb;
    int ent;
    @(posedge clk); #1;
    op = o; addr = a; key = k; wval = v; wdc = d;
    msb = a[9:8]; ent = int'(a[7:0]);
    x.valid_s = 0; x.valid_r = 0; x.ben = '0; x.rv = '0; x.rdc = '0;
    for (int b = 0; b <= NS; b++) x.ml[b] = '0;
    case (o)
      OP_SEARCH: x = model_search(k);
      OP_READ: begin
        x.valid_r = 1;
        if (msb == 0) begin x.rv = e_val[ent]; x.rdc = e_dc[ent]; n_read_ext++; end
        else begin
          x.rv = {mf_val[msb], s_val[msb][ent]}; x.rdc = {mf_dc[msb], s_dc[msb][ent]}; n_read_sub++;
        end
      end
      OP_WRITE: begin
        if (msb == 0) begin e_val[ent] = v; e_dc[ent] = d; end
        else begin
          s_val[msb][ent] = v[IFW-1:0]; s_dc[msb][ent] = d[IFW-1:0];
          if (!have_last || msb != last_msb) begin
            mf_val[msb] = v[M-1 -: K]; mf_dc[msb] = d[M-1 -: K]; n_mf_written++;
          end else if (v[M-1 -: K] != mf_val[msb]) n_mf_kept++;
        end
        have_last = 1; last_msb = msb;
      end
      default: ;
    endcase
    x.due = cyc + 2;   // registered at the next edge, result at the one after
    exp_q.push_back(x);
  endtask

  // ---------------- result checker: each command's result is due one edge later
  initial begin
    exp_t x;
    forever begin
      @(posedge clk); #2;
      if (exp_q.size() > 0 && exp_q[0].due == cyc) begin
        x = exp_q.pop_front();
        checks++;
        if (srch_valid !== x.valid_s || rd_valid !== x.valid_r) begin
          failures++; $display("FAIL %0t valid s=%b/%b r=%b/%b", $time, srch_valid, x.valid_s, rd_valid, x.valid_r);
        end
        if (x.valid_s) begin
          checks += 2;
          if (ben_q !== x.ben) begin failures++; $display("FAIL %0t ben=%b exp=%b", $time, ben_q, x.ben); end
          if (ml_extra !== x.ml[0] || ml_sub[0] !== x.ml[1] || ml_sub[1] !== x.ml[2] || ml_sub[2] !== x.ml[3]) begin
            failures++; $display("FAIL %0t match lines differ (ben=%b)", $time, x.ben);
          end
          for (int b = 0; b <= NS; b++) if (x.ben[b]) begin
            if (b > 0) n_sub_hit[b]++; else n_extra_fall++;
            if ($countones(x.ml[b]) > 1) n_multi++;
            if (x.ml[b] == '0) n_bank_miss++;
          end
        end
        if (x.valid_r) begin
          checks++;
          if (rd_val !== x.rv || rd_dc !== x.rdc) begin failures++; $display("FAIL %0t read %h/%h exp %h/%h", $time, rd_val, rd_dc, x.rv, x.rdc); end
        end
      end
    end
  end

  // only the selected bank evaluates
  always @(posedge clk) begin
    if (rst_n && bank_eval != '0) begin
      checks++;
      if (!$onehot(bank_eval)) begin failures++; $display("FAIL %0t banks evaluating: %b", $time, bank_eval); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus
  localparam logic [7:0] MF [NS+1] = '{8'd0, 8'd143, 8'd203, 8'd201};

  initial begin
    logic [M-1:0] v, d, k;
    int b, e, prev;
    op = OP_NOP; addr = '0; key = '0; wval = '0; wdc = '0; have_last = 0; last_msb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // sub-banks: 256 entries each, MF in the upper byte; after the first write of
    // a bank the upper byte carries junk, which must not reach the MF word
    for (int n = 1; n <= NS; n++)
      for (int i = 0; i < N; i++) begin
        v = rnd(); v[M-1 -: K] = (i == 0) ? MF[n] : 8'($urandom);
        d = tail_dc($urandom_range(0, 3) * 8 + ((i % 4 == 0) ? 40 : 0)) & {{K{1'b0}}, {IFW{1'b1}}};
        if (n == 2 && i == 0) d[M-1 -: K] = 8'h01;           // ternary MF: 202/203 share a sub-bank
        if (i % 16 == 5) begin v[IFW-1:0] = s_val[n][i-1]; d[IFW-1:0] = s_dc[n][i-1]; end   // both columns
        if (i % 32 == 9) begin v[IFW-1:0] = s_val[n][i-7]; d[IFW-1:0] = s_dc[n][i-7]; end   // other word line
        issue(OP_WRITE, {2'(n), 8'(i)}, '0, v, d);
      end
    // extra bank: whole 144-bit entries whose MF matches none of the groups
    for (int i = 0; i < N; i++) begin
      v = rnd();
      do v[M-1 -: K] = 8'($urandom); while (v[M-1 -: K] inside {8'd143, 8'd202, 8'd203, 8'd201});
      d = tail_dc($urandom_range(0, 4) * 8);
      if (i % 16 == 7) begin v = e_val[i-1]; d = e_dc[i-1]; end
      issue(OP_WRITE, {2'd0, 8'(i)}, '0, v, d);
    end
    n_dc_mf = 0;

    // read back a sample of every bank
    for (int i = 0; i < 64; i++) issue(OP_READ, {2'(i % 4), 8'($urandom)}, '0, '0, '0);

    // back-to-back searches
    prev = 0;
    for (int t = 0; t < 1500; t++) begin
      b = $urandom_range(0, NS);
      e = $urandom_range(0, N - 1);
      if (b == 0) begin
        k = (e_val[e] & ~e_dc[e]) | (rnd() & e_dc[e]);
      end else begin
        k = {mf_val[b], (s_val[b][e] & ~s_dc[b][e]) | (IFW'(rnd()) & s_dc[b][e])};
        if (b == 2 && t % 2 == 1) begin k[M-1 -: K] = 8'd202; n_dc_mf++; end
      end
      if (t % 6 == 3) k[$urandom_range(0, M - 1)] ^= 1'b1;     // near miss
      if (t % 11 == 10) k = rnd();                              // anything
      issue(OP_SEARCH, '0, k, '0, '0);
      if (prev == 1) n_back2back++;
      prev = 1;
      // now and then rewrite an entry and search for it in the very next cycle
      if (t % 50 == 25) begin
        v = (b == 0) ? rnd() : {mf_val[b], IFW'(rnd())};
        if (b == 0) while (v[M-1 -: K] inside {8'd143, 8'd202, 8'd203, 8'd201}) v[M-1 -: K] = 8'($urandom);
        issue(OP_WRITE, {2'(b), 8'(e)}, '0, v, '0);
        issue(OP_SEARCH, '0, v, '0, '0);
        n_wr_then_search++;
        prev = 0;
      end
    end
    issue(OP_NOP, '0, '0, '0, '0);
    issue(OP_NOP, '0, '0, '0, '0);
    @(posedge clk); @(posedge clk); #5;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results never checked", exp_q.size()); end

    $display("sub hits: %0d %0d %0d, extra fall-through %0d", n_sub_hit[1], n_sub_hit[2], n_sub_hit[3], n_extra_fall);
    $display("column priority %0d, multi-line %0d, miss in selected bank %0d", n_prio, n_multi, n_bank_miss);
    $display("MF written %0d, MF kept %0d, ternary MF %0d, reads sub/ext %0d/%0d, back-to-back %0d, write-then-search %0d",
             n_mf_written, n_mf_kept, n_dc_mf, n_read_sub, n_read_ext, n_back2back, n_wr_then_search);
    begin
      int ev [14];
      ev = '{n_sub_hit[1], n_sub_hit[2], n_sub_hit[3], n_extra_fall, n_prio, n_multi, n_bank_miss,
             n_mf_written, n_mf_kept, n_dc_mf, n_read_sub, n_read_ext, n_back2back, n_wr_then_search};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
