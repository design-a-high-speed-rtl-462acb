// tb_siso_shift_register: self-checking testbench for the serial-in
// serial-out register (8 stages of 8 bits). Random words are shifted in with
// a random shift enable; every word must come out exactly 8 enabled shifts
// later, sout_valid must be low until the register has been filled and high on
// every later enabled cycle, and nothing may move while shift_en is low.
// Ends with a TB_RESULT line.
module tb_siso_shift_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [7:0] sin, sout;
  logic sout_valid;

  siso_shift_register dut (.*);

  always #5 clk = ~clk;

  logic [7:0] hist[$];
  int shifts = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sin = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      shift_en = ($urandom % 4) != 0;
      sin      = 8'($urandom);
      #1;
      if (shift_en) begin
        checks++;
        if (sout_valid !== (shifts >= 8)) begin
          failures++;
          $display("FAIL valid at shift %0d: %b", shifts, sout_valid);
        end
        if (shifts >= 8) begin
          checks++;
          if (sout !== hist[shifts - 8]) begin
            failures++;
            $display("FAIL shift %0d: exp %h got %h", shifts, hist[shifts - 8], sout);
          end
        end
        hist.push_back(sin);
        shifts++;
      end else begin
        checks++;
        if (sout_valid !== 1'b0) begin
          failures++;
          $display("FAIL valid without shift");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
