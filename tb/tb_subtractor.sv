// tb_subtractor: self-checking testbench for the ripple-borrow subtractor.
// Exhaustive over all 8-bit operand pairs (default width): the difference must
// equal a - b modulo 256 and the borrow out must be set exactly when a < b.
// A 17-bit instance is checked on random operands. Ends with a TB_RESULT line.
module tb_subtractor;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, d8;
  logic        bo8;
  logic [16:0] a17, b17, d17;
  logic        bo17;

  subtractor dut8 (.a(a8), .b(b8), .diff(d8), .bout(bo8));
  subtractor #(.WIDTH(17)) dut17 (.a(a17), .b(b17), .diff(d17), .bout(bo17));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (d8 !== 8'(x - y) || bo8 !== (x < y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8b: %0d - %0d got %0d borrow %b", x, y, d8, bo8);
        end
      end
    for (int k = 0; k < 20000; k++) begin
      a17 = 17'($urandom); b17 = 17'($urandom);
      #1;
      checks++;
      if (d17 !== 17'(a17 - b17) || bo17 !== (a17 < b17)) begin
        failures++;
        if (failures < 10) $display("FAIL 17b: %0d - %0d got %0d", a17, b17, d17);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
