// tb_main_bank: three 8-bit merged-field words. Words are written through
// their word lines and read back; searches with random and chosen keys check
// that each bank enable follows its MF match line and that the extra-bank
// enable rises exactly when no MF matches. Outside search the enables must
// follow the word lines.
module tb_main_bank;
  localparam int K = 8, NS = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_extra = 0, n_sub[NS+1];

  logic search, mf_we;
  logic [K-1:0] key, wval, wdc, rd_val, rd_dc;
  logic [NS:0] wl, ben, exp_ben;
  logic [NS:1] ml;
  logic [K-1:0] r_val [NS+1], r_dc [NS+1];

  main_bank #(.K(K), .N_SUB(NS)) dut (.clk(clk), .search(search), .key(key), .wl(wl), .mf_we(mf_we),
    .wval(wval), .wdc(wdc), .ben(ben), .ml(ml), .rd_val(rd_val), .rd_dc(rd_dc));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    search = 0; mf_we = 0; key = '0; wval = '0; wdc = '0; wl = '0;
    for (int t = 0; t < 100; t++) begin
      for (int n = 1; n <= NS; n++) begin
        @(negedge clk);
        wl = '0; wl[n] = 1'b1; mf_we = 1;
        wval = K'($urandom); wdc = (t % 4 == 0) ? (K'($urandom) & K'($urandom)) : '0;
        r_val[n] = wval; r_dc[n] = wdc;
        #1;
        checks++;
        if (ben !== wl) begin failures++; $display("FAIL write ben=%b wl=%b", ben, wl); end
      end
      @(negedge clk);
      mf_we = 0;
      // a word line without mf_we must not write
      wl = 4'b0010; wval = ~r_val[1];
      @(negedge clk);
      for (int n = 0; n <= NS; n++) begin
        wl = '0; wl[n] = 1'b1; #1;
        checks++;
        if (n > 0 && (rd_val !== r_val[n] || rd_dc !== r_dc[n])) begin failures++; $display("FAIL read %0d", n); end
        if (n == 0 && ben !== 4'b0001) begin failures++; $display("FAIL WL0 does not select the extra bank"); end
      end
      wl = '0;
      search = 1;
      for (int s = 0; s < 20; s++) begin
        int pick;
        pick = $urandom_range(0, NS);
        key = (pick == 0) ? K'($urandom) : ((r_val[pick] & ~r_dc[pick]) | (K'($urandom) & r_dc[pick]));
        #1;
        exp_ben = '0;
        for (int n = 1; n <= NS; n++) exp_ben[n] = (((key ^ r_val[n]) & ~r_dc[n]) == '0);
        exp_ben[0] = (exp_ben[NS:1] == '0);
        checks++;
        if (ben !== exp_ben) begin failures++; $display("FAIL search key=%h ben=%b exp=%b", key, ben, exp_ben); end
        if (exp_ben[0]) n_extra++;
        for (int n = 1; n <= NS; n++) if (exp_ben[n]) n_sub[n]++;
      end
      search = 0;
    end
    $display("extra=%0d sub1=%0d sub2=%0d sub3=%0d", n_extra, n_sub[1], n_sub[2], n_sub[3]);
    checks++;
    if (n_extra == 0 || n_sub[1] == 0 || n_sub[2] == 0 || n_sub[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
