// tb_nor_tcam_word: writes random ternary words into the NOR word, searches
// with keys that match or miss by construction and compares the match line
// and the read-back with a reference computed here.
module tb_nor_tcam_word;
  localparam int K = 8;
  logic clk = 0;
  logic we;
  logic [K-1:0] wval, wdc, key, rd_val, rd_dc;
  logic ml;
  logic [K-1:0] r_val, r_dc;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  always #5 clk = ~clk;

  nor_tcam_word #(.K(K)) dut (.clk(clk), .we(we), .wval(wval), .wdc(wdc), .key(key),
                              .ml(ml), .rd_val(rd_val), .rd_dc(rd_dc));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wval = '0; wdc = '0; key = '0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we = 1; wval = K'($urandom); wdc = K'($urandom) & K'($urandom);
      r_val = wval; r_dc = wdc;
      @(negedge clk);
      we = 0;
      checks++;
      if (rd_val !== r_val || rd_dc !== r_dc) begin
        failures++; $display("FAIL read %h/%h", rd_val, rd_dc);
      end
      for (int s = 0; s < 8; s++) begin
        key = (s % 2 == 0) ? ((r_val & ~r_dc) | (K'($urandom) & r_dc)) : K'($urandom);
        #1;
        checks++;
        if (ml !== ((((key ^ r_val) & ~r_dc)) == '0)) begin
          failures++; $display("FAIL key=%h val=%h dc=%h ml=%b", key, r_val, r_dc, ml);
        end
        if (ml) hits++; else misses++;
      end
    end
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
