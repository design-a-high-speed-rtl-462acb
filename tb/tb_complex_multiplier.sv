// tb_complex_multiplier: self-checking testbench for the three-multiplier
// complex product. For each of the eight 8-point twiddle factors, quantised
// here from $cos/$sin (6 fraction bits, round half away from zero), and for
// random and extreme 8-bit data it expects
//   r = (x*C - y*S) >>> 6,  i = (x*S + y*C) >>> 6
// computed with the integer operators. Ends with a TB_RESULT line.
module tb_complex_multiplier;
  int checks = 0, failures = 0;

  logic signed [7:0] x, y, c;
  logic signed [8:0] cps, cms, r, i;

  complex_multiplier dut (.x, .y, .c, .cps, .cms, .r, .i);

  function automatic int q(real v);
    return $rtoi(v * 64.0 + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  task automatic try(int xv, int yv, int cv, int sv);
    int er, ei;
    x = 8'(xv); y = 8'(yv); c = 8'(cv); cps = 9'(cv + sv); cms = 9'(cv - sv);
    #1;
    er = (xv * cv - yv * sv) >>> 6;
    ei = (xv * sv + yv * cv) >>> 6;
    checks++;
    if (int'(r) != er || int'(i) != ei) begin
      failures++;
      if (failures < 10)
        $display("FAIL (%0d,%0d)*(%0d,%0d): exp (%0d,%0d) got (%0d,%0d)", xv, yv, cv, sv, er, ei, r, i);
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
    for (int k = 0; k < 8; k++) begin
      int cv, sv;
      cv = q($cos(2.0 * 3.14159265358979 * k / 8.0));
      sv = q(-$sin(2.0 * 3.14159265358979 * k / 8.0));
      try(127, 127, cv, sv);
      try(-128, -128, cv, sv);
      try(127, -128, cv, sv);
      try(-128, 127, cv, sv);
      for (int n = 0; n < 2000; n++) try($signed(8'($urandom)), $signed(8'($urandom)), cv, sv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
