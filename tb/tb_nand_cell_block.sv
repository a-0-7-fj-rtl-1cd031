// tb_nand_cell_block: two cell blocks, 36 x 2 cells (the 144-bit bank) and
// 34 x 2 cells (the 136-bit sub-bank). Random ternary data is written into
// both columns through the column-decoded port and read back; searches use
// keys that match one column, both, or miss in a chosen nine-cell segment,
// so that every repeater segment breaks a match at least once. Matches are
// compared with a reference computed bit by bit; no match may appear while
// the bank does not evaluate.
module tb_nand_cell_block;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int seg_breaks [2][4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- 36-bit block
  logic eval, we, col;
  logic [35:0] sl, wval, wdc, rd_val, rd_dc;
  logic [1:0] match;
  logic [35:0] r_val [2], r_dc [2];
  nand_cell_block #(.CBW(36)) dut (.clk(clk), .eval(eval), .sl(sl), .match(match), .we(we), .col(col),
    .wval(wval), .wdc(wdc), .rd_val(rd_val), .rd_dc(rd_dc));

  // ---- 34-bit block
  logic [33:0] sl2, wval2, wdc2, rd_val2, rd_dc2;
  logic [1:0] match2;
  logic [33:0] q_val [2], q_dc [2];
  nand_cell_block #(.CBW(34)) dut2 (.clk(clk), .eval(eval), .sl(sl2), .match(match2), .we(we), .col(col),
    .wval(wval2), .wdc(wdc2), .rd_val(rd_val2), .rd_dc(rd_dc2));

  function automatic logic ref_match(logic [35:0] v, logic [35:0] d, logic [35:0] k, int n);
    for (int b = 0; b < n; b++) if (!d[b] && v[b] != k[b]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check_both(logic ev);
    logic [1:0] e1, e2;
    #1;
    for (int c = 0; c < 2; c++) begin
      e1[c] = ev && ref_match(r_val[c], r_dc[c], sl, 36);
      e2[c] = ev && ref_match({2'b0, q_val[c]}, {2'b0, q_dc[c]}, {2'b0, sl2}, 34);
    end
    checks += 2;
    if (match !== e1) begin failures++; $display("FAIL 36b match=%b exp=%b", match, e1); end
    if (match2 !== e2) begin failures++; $display("FAIL 34b match=%b exp=%b", match2, e2); end
  endtask

  initial begin
    eval = 0; we = 0; col = 0; sl = '0; sl2 = '0; wval = '0; wdc = '0; wval2 = '0; wdc2 = '0;
    for (int t = 0; t < 300; t++) begin
      // write both columns
      for (int c = 0; c < 2; c++) begin
        @(negedge clk);
        we = 1; col = c[0];
        wval = {$urandom, $urandom}; wdc = (t % 3 == 0) ? 36'({$urandom, $urandom} & {$urandom, $urandom}) : '0;
        wval2 = {$urandom, $urandom}; wdc2 = (t % 3 == 1) ? 34'({$urandom, $urandom} & {$urandom, $urandom}) : '0;
        r_val[c] = wval; r_dc[c] = wdc; q_val[c] = wval2; q_dc[c] = wdc2;
      end
      @(negedge clk);
      we = 0;
      // read back both columns
      for (int c = 0; c < 2; c++) begin
        col = c[0]; #1;
        checks += 2;
        if (rd_val !== r_val[c] || rd_dc !== r_dc[c]) begin failures++; $display("FAIL read 36b col %0d", c); end
        if (rd_val2 !== q_val[c] || rd_dc2 !== q_dc[c]) begin failures++; $display("FAIL read 34b col %0d", c); end
      end
      // searches
      for (int s = 0; s < 6; s++) begin
        int c, bit_i;
        c = s % 2;
        sl  = (r_val[c] & ~r_dc[c]) | ({$urandom, $urandom} & r_dc[c]);
        sl2 = (q_val[c] & ~q_dc[c]) | (34'({$urandom, $urandom}) & q_dc[c]);
        if (s >= 2 && s < 4) begin
          // break the match in one segment of column c, if that bit cares
          bit_i = $urandom_range(0, 33);
          if (!r_dc[c][bit_i]) seg_breaks[0][bit_i / 9]++;
          if (!q_dc[c][bit_i]) seg_breaks[1][bit_i / 9]++;
          sl[bit_i] = ~sl[bit_i];
          sl2[bit_i] = ~sl2[bit_i];
        end else if (s >= 4) begin
          sl = {$urandom, $urandom}; sl2 = 34'({$urandom, $urandom});
        end
        eval = 1; check_both(1'b1);
        eval = 0; check_both(1'b0);
      end
    end
    for (int i = 0; i < 2; i++)
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (seg_breaks[i][g] == 0) begin failures++; $display("FAIL segment %0d of block %0d never broken", g, i); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
