// tb_partial_match: exhaustive check of the partial match block. A partial
// match line of a column is set only when both cell blocks match in it.
module tb_partial_match;
  logic [1:0] x, y, xy;
  int checks = 0, failures = 0;

  partial_match dut (.x(x), .y(y), .xy(xy));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {x, y} = 4'(i);
      #1;
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (xy[c] !== (x[c] && y[c])) begin
          failures++;
          $display("FAIL x=%b y=%b xy=%b", x, y, xy);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
