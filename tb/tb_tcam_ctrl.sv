// tb_tcam_ctrl: drives reads, writes, searches and idle cycles with random
// MSB addresses and checks the one-hot word lines and the MF write enable
// against a reference: the MF of a sub-bank is written only by a sub-bank
// write whose MSB differs from that of the previous write.
module tb_tcam_ctrl;
  import tcam_pkg::*;
  localparam int NS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_mf = 0, n_kept = 0;

  op_e op;
  logic [1:0] msb, last;
  logic [NS:0] wl, exp_wl;
  logic mf_we, exp_mf, have_last;

  tcam_ctrl #(.N_SUB(NS)) dut (.clk(clk), .rst_n(rst_n), .op(op), .msb(msb), .wl(wl), .mf_we(mf_we));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_NOP; msb = '0; have_last = 0; last = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      op = op_e'($urandom_range(0, 3));
      msb = (t % 3 == 0) ? last : 2'($urandom);
      #1;
      exp_wl = '0;
      if (op == OP_WRITE || op == OP_READ) exp_wl[msb] = 1'b1;
      exp_mf = (op == OP_WRITE) && msb != 0 && (!have_last || msb != last);
      checks++;
      if (wl !== exp_wl || mf_we !== exp_mf) begin
        failures++;
        $display("FAIL op=%0d msb=%0d wl=%b/%b mf_we=%b/%b", op, msb, wl, exp_wl, mf_we, exp_mf);
      end
      if (exp_mf) n_mf++;
      if (op == OP_WRITE && msb != 0 && !exp_mf) n_kept++;
      if (op == OP_WRITE) begin have_last = 1; last = msb; end
    end
    $display("mf_written=%0d mf_kept=%0d", n_mf, n_kept);
    checks++;
    if (n_mf == 0 || n_kept == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
