// tb_nand_bank: the 144-bit extra-bank configuration at full size (128 word
// lines x 2 columns). All 256 entries are written through the column-decoded
// port, some of them duplicated so that several word lines and both columns of
// one word match together. Each search is presented for one cycle; its 256
// match outputs must appear after exactly one rising edge and equal a
// reference computed here (column 0 wins within a word line). Searches and
// writes with the bank enable low must change nothing: no match outputs, no
// search-line activity and no stored data.
module tb_nand_bank;
  localparam int W = 144, WORDS = 128, N = 2 * WORDS;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_multi = 0, n_prio = 0, n_miss = 0, n_off = 0;

  logic ben, search, wr, col;
  logic [6:0] wl;
  logic [W-1:0] key, wval, wdc, rd_val, rd_dc;
  logic [N-1:0] ml_q, exp_ml;
  logic active;
  logic [W-1:0] r_val [N], r_dc [N];

  nand_bank #(.W(W), .WORDS(WORDS)) dut (.clk(clk), .ben(ben), .search(search), .wr(wr), .key(key),
    .wl(wl), .col(col), .wval(wval), .wdc(wdc), .ml_q(ml_q), .active(active), .rd_val(rd_val), .rd_dc(rd_dc));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  function automatic logic [N-1:0] ref_ml(logic [W-1:0] k);
    logic [N-1:0] r;
    for (int e = 0; e < N; e++) r[e] = (((k ^ r_val[e]) & ~r_dc[e]) == '0);
    for (int w = 0; w < WORDS; w++) if (r[2*w]) r[2*w+1] = 1'b0;
    return r;
  endfunction

  // present one command for one cycle; returns after the rising edge ending it
  task automatic cycle(logic b, logic s, logic w_, logic [7:0] a, logic [W-1:0] k, logic [W-1:0] v, logic [W-1:0] d);
    @(posedge clk); #1;
    ben = b; search = s; wr = w_; {wl, col} = a; key = k; wval = v; wdc = d;
    @(posedge clk); #1;
    ben = 0; search = 0; wr = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] sl_before, k;
    int e;
    ben = 0; search = 0; wr = 0; wl = '0; col = 0; key = '0; wval = '0; wdc = '0;
    // fill every entry
    for (int i = 0; i < N; i++) begin
      if (i >= 8 && i % 8 == 0) begin
        r_val[i] = r_val[i - 7]; r_dc[i] = r_dc[i - 7];   // duplicate an earlier entry
      end else if (i % 8 == 3) begin
        r_val[i] = r_val[i - 1]; r_dc[i] = r_dc[i - 1];   // same entry in both columns
      end else begin
        r_val[i] = rnd(); r_dc[i] = (i % 2 == 0) ? (rnd() & rnd() & rnd()) : '0;
      end
      cycle(1'b1, 1'b0, 1'b1, 8'(i), '0, r_val[i], r_dc[i]);
    end
    // read back
    for (int i = 0; i < N; i++) begin
      {wl, col} = 8'(i); #1;
      checks++;
      if (rd_val !== r_val[i] || rd_dc !== r_dc[i]) begin failures++; $display("FAIL read entry %0d", i); end
    end
    // a write while disabled must not land
    cycle(1'b0, 1'b0, 1'b1, 8'd5, '0, ~r_val[5], '0);
    {wl, col} = 8'd5; #1;
    checks++;
    if (rd_val !== r_val[5] || rd_dc !== r_dc[5]) begin failures++; $display("FAIL write landed while disabled"); end
    // searches
    for (int t = 0; t < 300; t++) begin
      e = $urandom_range(0, N - 1);
      k = (r_val[e] & ~r_dc[e]) | (rnd() & r_dc[e]);
      if (t % 5 == 4) k[$urandom_range(0, W - 1)] ^= 1'b1;
      if (t % 7 == 6) k = rnd();
      exp_ml = ref_ml(k);
      @(posedge clk); #1;
      ben = 1; search = 1; key = k;
      @(posedge clk); #1;
      ben = 0; search = 0;
      // result registered at the rising edge that ended the search cycle
      checks++;
      if (ml_q !== exp_ml) begin failures++; $display("FAIL search %0d: %h exp %h", t, ml_q, exp_ml); end
      if ($countones(exp_ml) > 1) n_multi++;
      if (exp_ml == '0) n_miss++;
      for (int w = 0; w < WORDS; w++)
        if (exp_ml[2*w] && (((k ^ r_val[2*w+1]) & ~r_dc[2*w+1]) == '0)) n_prio++;
      // a disabled search: no matches and search lines held
      if (t % 10 == 0) begin
        sl_before = dut.sl_q;
        @(posedge clk); #1;
        ben = 0; search = 1; key = ~k;
        @(posedge clk); #1;
        search = 0;
        n_off++;
        checks += 2;
        if (ml_q !== '0) begin failures++; $display("FAIL disabled bank matched"); end
        if (dut.sl_q !== sl_before) begin failures++; $display("FAIL search lines moved while disabled"); end
      end
    end
    $display("multi=%0d prio=%0d miss=%0d off=%0d", n_multi, n_prio, n_miss, n_off);
    checks++;
    if (n_multi == 0 || n_prio == 0 || n_miss == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
