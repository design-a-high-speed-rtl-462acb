// tb_radix2_butterfly: self-checking testbench for the radix-2 butterfly.
// Random and extreme 9-bit complex operands; sum and difference must equal
// a + b and a - b exactly on 10 bits. Ends with a TB_RESULT line.
module tb_radix2_butterfly;
  int checks = 0, failures = 0;

  logic signed [8:0] a_re, a_im, b_re, b_im;
  logic signed [9:0] sum_re, sum_im, diff_re, diff_im;

  radix2_butterfly #(.W(9)) dut (.*);

  task automatic try(int ar, int ai, int br, int bi);
    a_re = 9'(ar); a_im = 9'(ai); b_re = 9'(br); b_im = 9'(bi);
    #1;
    checks++;
    if (int'(sum_re) != ar + br || int'(sum_im) != ai + bi ||
        int'(diff_re) != ar - br || int'(diff_im) != ai - bi) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=(%0d,%0d) b=(%0d,%0d): got s=(%0d,%0d) d=(%0d,%0d)",
                 ar, ai, br, bi, sum_re, sum_im, diff_re, diff_im);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(255, -256, -256, 255);
    try(-256, -256, -256, -256);
    try(255, 255, 255, 255);
    for (int n = 0; n < 50000; n++)
      try($signed(9'($urandom)), $signed(9'($urandom)), $signed(9'($urandom)), $signed(9'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
