// tb_sdf_stage: self-checking testbench for the radix-2 SDF stage.
//
// Three 8-point stages (s = 1, 2, 3, delays 4, 2, 1), each with 8-bit input,
// receive the same random complex stream with random gaps in in_valid. For
// every frame the testbench computes the stage's outputs itself: for each pair
// of positions (i, i + D) it quantises W_8^e from $cos/$sin (6 fraction bits),
// multiplies the lower sample with integer operators, truncates by 6 bits and
// forms upper + W*lower and upper - W*lower, in position order. Each output
// must match, and must appear (out_valid) one cycle after the sample D
// positions later was accepted. Ends with a TB_RESULT line.
module tb_sdf_stage;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] in_re = 0, in_im = 0;

  always #5 clk = ~clk;

  logic              v1, v2, v3;
  logic signed [8:0] o1_re, o1_im;
  logic signed [9:0] o2_re, o2_im, o3_re, o3_im;

  sdf_stage #(.STAGE(1)) u_s1 (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v1), .out_re(o1_re), .out_im(o1_im));
  sdf_stage #(.STAGE(2)) u_s2 (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v2), .out_re(o2_re), .out_im(o2_im));
  sdf_stage #(.STAGE(3)) u_s3 (.clk, .rst_n, .in_valid, .in_re, .in_im, .out_valid(v3), .out_re(o3_re), .out_im(o3_im));

  localparam int FRAMES = 40;

  int in_re_q[$], in_im_q[$];   // accepted samples
  int acc_cyc[$];               // cycle of each accepted sample
  int exp_re[3][$], exp_im[3][$];
  int nout[3];
  int cyc = 0;

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int k = 0; k < bits; k++) if (v & (1 << k)) r |= 1 << (bits - 1 - k);
    return r;
  endfunction

  function automatic int q(real v);
    return $rtoi(v * 64.0 + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Expected outputs of stage s for the frame starting at sample index base.
  task automatic model(int s, int base);
    int d = 8 >> s;
    int ore[8], oim[8];
    for (int i = 0; i < 8; i++) begin
      if ((i & d) == 0) begin
        int e, c, sn, lr, li, ur, ui;
        e  = brev(i >> (3 - s + 1), s - 1) * (8 >> s);
        c  = q($cos(2.0 * 3.14159265358979 * e / 8.0));
        sn = q(-$sin(2.0 * 3.14159265358979 * e / 8.0));
        ur = in_re_q[base + i];     ui = in_im_q[base + i];
        lr = in_re_q[base + i + d]; li = in_im_q[base + i + d];
        if (s > 1) begin
          int tr, ti;
          tr = (lr * c - li * sn) >>> 6;
          ti = (lr * sn + li * c) >>> 6;
          lr = tr; li = ti;
        end
        ore[i] = ur + lr;     oim[i] = ui + li;
        ore[i + d] = ur - lr; oim[i + d] = ui - li;
      end
    end
    for (int i = 0; i < 8; i++) begin
      exp_re[s-1].push_back(ore[i]);
      exp_im[s-1].push_back(oim[i]);
    end
  endtask

  // Outputs are recorded as they appear and compared once the whole stream,
  // and so the expected values, are known.
  int got_re[3][$], got_im[3][$], got_cyc[3][$];

  task automatic record(int s, int re, int im);
    got_re[s-1].push_back(re);
    got_im[s-1].push_back(im);
    got_cyc[s-1].push_back(cyc);
  endtask

  task automatic check_all(int s);
    int d = 8 >> s;
    nout[s-1] = got_re[s-1].size();
    for (int g = 0; g < got_re[s-1].size(); g++) begin
      checks++;
      if (g >= exp_re[s-1].size() || got_re[s-1][g] != exp_re[s-1][g] || got_im[s-1][g] != exp_im[s-1][g]) begin
        failures++;
        if (failures < 10) $display("FAIL stage %0d output %0d: got (%0d,%0d)", s, g, got_re[s-1][g], got_im[s-1][g]);
      end
      checks++;
      if (g + d >= acc_cyc.size() || got_cyc[s-1][g] != acc_cyc[g + d] + 1) begin
        failures++;
        if (failures < 10) $display("FAIL stage %0d output %0d latency at cycle %0d", s, g, got_cyc[s-1][g]);
      end
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (v1) record(1, int'(o1_re), int'(o1_im));
      if (v2) record(2, int'(o2_re), int'(o2_im));
      if (v3) record(3, int'(o3_re), int'(o3_im));
      if (in_valid) begin
        in_re_q.push_back(int'(in_re));
        in_im_q.push_back(int'(in_im));
        acc_cyc.push_back(cyc);
        if (in_re_q.size() % 8 == 0)
          for (int s = 1; s <= 3; s++) model(s, in_re_q.size() - 8);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (in_re_q.size() < FRAMES * 8) begin
      @(negedge clk);
      in_valid = (in_re_q.size() < 8 * 8) ? 1'b1 : (($urandom % 3) != 0);
      if ($urandom % 8 == 0) begin
        in_re = (($urandom % 2) != 0) ? 8'sd127 : -8'sd128;
        in_im = (($urandom % 2) != 0) ? 8'sd127 : -8'sd128;
      end else begin
        in_re = $signed(8'($urandom));
        in_im = $signed(8'($urandom));
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    for (int s = 1; s <= 3; s++) check_all(s);
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (nout[s] < (FRAMES - 1) * 8) begin
        failures++;
        $display("FAIL stage %0d produced only %0d outputs", s + 1, nout[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
