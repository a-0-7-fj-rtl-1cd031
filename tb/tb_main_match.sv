// tb_main_match: exhaustive check of the main match block / local priority
// encoder: a column matches when both partial lines match, and column 0 wins
// when both columns match.
module tb_main_match;
  logic [1:0] ab, cd, mlout;
  logic m0, m1;
  int checks = 0, failures = 0, both = 0;

  main_match dut (.ab(ab), .cd(cd), .mlout(mlout));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {ab, cd} = 4'(i);
      #1;
      m0 = ab[0] && cd[0];
      m1 = ab[1] && cd[1];
      if (m0 && m1) both++;
      checks++;
      if (mlout !== {m1 && !m0, m0}) begin
        failures++;
        $display("FAIL ab=%b cd=%b mlout=%b", ab, cd, mlout);
      end
    end
    checks++;
    if (both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
