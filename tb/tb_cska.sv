// tb_cska: self-checking testbench for the carry skip adder.
// Checks the default 8-bit, 4-bit-block adder exhaustively (all a, b, cin)
// against the integer sum, and a 13-bit adder with a short last block on
// random operands plus operands that make a carry travel through every skip
// path. Ends with a TB_RESULT line.
module tb_cska;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  cska dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  cska #(.WIDTH(13), .BLOCK(4)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic check13(logic [12:0] x, logic [12:0] y, logic c);
    logic [13:0] exp;
    a13 = x; b13 = y; ci13 = c;
    #1;
    exp = 14'(x) + 14'(y) + 14'(c);
    checks++;
    if ({co13, s13} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 13b: %h + %h + %b = %h, got %h", x, y, c, exp, {co13, s13});
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
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          logic [8:0] exp;
          a8 = 8'(x); b8 = 8'(y); ci8 = 1'(c);
          #1;
          exp = 9'(x + y + c);
          checks++;
          if ({co8, s8} !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL 8b: %0d + %0d + %0d = %0d, got %0d", x, y, c, exp, {co8, s8});
          end
        end
    // Carry generated at bit 0 and skipped through all-propagate blocks.
    check13(13'h0001, 13'h1FFF, 1'b0);
    check13(13'h0AAA, 13'h1555, 1'b1);
    check13(13'h1FFF, 13'h1FFF, 1'b1);
    for (int k = 0; k < 20000; k++) check13(13'($urandom), 13'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
