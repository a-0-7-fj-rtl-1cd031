// tb_ml_repeater: exhaustive check of the match line repeater. The output may
// carry a match only during evaluation and only when the input carries one.
module tb_ml_repeater;
  logic eval, ml_in, ml_out;
  int checks = 0, failures = 0;

  ml_repeater dut (.eval(eval), .ml_in(ml_in), .ml_out(ml_out));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {eval, ml_in} = 2'(i);
      #1;
      checks++;
      if (ml_out !== (i == 3)) begin
        failures++;
        $display("FAIL eval=%0b ml_in=%0b ml_out=%0b", eval, ml_in, ml_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
