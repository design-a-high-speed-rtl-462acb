// tb_baugh_wooley_multiplier: self-checking testbench for the signed array
// multiplier. Exhaustive over all pairs of 8-bit two's complement operands
// (default size) and of 5-bit operands, comparing the 2N-bit product with the
// integer product. Ends with a TB_RESULT line.
module tb_baugh_wooley_multiplier;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;

  baugh_wooley_multiplier dut8 (.a(a8), .b(b8), .p(p8));
  baugh_wooley_multiplier #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++)
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if ($signed(p8) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL 8b: %0d * %0d got %0d", x, y, $signed(p8));
        end
      end
    for (int x = -16; x < 16; x++)
      for (int y = -16; y < 16; y++) begin
        a5 = 5'(x); b5 = 5'(y);
        #1;
        checks++;
        if ($signed(p5) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL 5b: %0d * %0d got %0d", x, y, $signed(p5));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
