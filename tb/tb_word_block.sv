// tb_word_block: one 144-bit, two-column word. Random ternary words are
// written to both columns; searches use keys matching column 0, column 1,
// both (equal or overlapping words) or neither, and a miss in a chosen cell
// block. MLout is compared with a reference: a column matches when all its
// 144 cells pass, and column 0 wins when both match.
module tb_word_block;
  localparam int W = 144;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_both = 0, n_c0 = 0, n_c1 = 0, n_none = 0;

  logic eval, we, col;
  logic [W-1:0] sl, wval, wdc, rd_val, rd_dc;
  logic [1:0] mlout;
  logic [W-1:0] r_val [2], r_dc [2];

  word_block #(.W(W)) dut (.clk(clk), .eval(eval), .sl(sl), .mlout(mlout), .we(we), .col(col),
    .wval(wval), .wdc(wdc), .rd_val(rd_val), .rd_dc(rd_dc));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m0, m1;
    eval = 0; we = 0; col = 0; sl = '0; wval = '0; wdc = '0;
    for (int t = 0; t < 400; t++) begin
      for (int c = 0; c < 2; c++) begin
        @(negedge clk);
        we = 1; col = c[0];
        if (c == 1 && t % 4 == 0) begin
          wval = r_val[0]; wdc = r_dc[0];          // same entry in both columns
        end else begin
          wval = rnd(); wdc = (t % 2 == 0) ? (rnd() & rnd() & rnd()) : '0;
        end
        r_val[c] = wval; r_dc[c] = wdc;
      end
      @(negedge clk);
      we = 0;
      for (int c = 0; c < 2; c++) begin
        col = c[0]; #1;
        checks++;
        if (rd_val !== r_val[c] || rd_dc !== r_dc[c]) begin failures++; $display("FAIL read col %0d", c); end
      end
      for (int s = 0; s < 4; s++) begin
        int c;
        c = s % 2;
        sl = (r_val[c] & ~r_dc[c]) | (rnd() & r_dc[c]);
        if (s == 2) sl[$urandom_range(0, W-1)] ^= 1'b1;
        if (s == 3 && t % 2 == 1) sl = rnd();
        eval = 1; #1;
        m0 = (((sl ^ r_val[0]) & ~r_dc[0]) == '0);
        m1 = (((sl ^ r_val[1]) & ~r_dc[1]) == '0);
        if (m0 && m1) n_both++; else if (m0) n_c0++; else if (m1) n_c1++; else n_none++;
        checks++;
        if (mlout !== {m1 && !m0, m0}) begin failures++; $display("FAIL t=%0d mlout=%b m0=%b m1=%b", t, mlout, m0, m1); end
        eval = 0; #1;
        checks++;
        if (mlout !== 2'b00) begin failures++; $display("FAIL match without evaluation"); end
      end
    end
    $display("both=%0d col0=%0d col1=%0d none=%0d", n_both, n_c0, n_c1, n_none);
    checks++;
    if (n_both == 0 || n_c0 == 0 || n_c1 == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
