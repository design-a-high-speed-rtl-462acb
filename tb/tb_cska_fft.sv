// tb_cska_fft: end-to-end testbench for the 8-point FFT at its default sizes
// (8 points, 8-bit input, 8-bit twiddles, 13-bit output).
//
// Frames are streamed in natural order: an impulse, a constant, the two 0/1
// sample patterns 1,0,0,0,1,0,0,0 (real) and 1,0,1,0,0,0,0,0 (imaginary),
// full-scale corner values and random data, first back to back and then with
// random gaps in in_valid, followed by zero frames to flush the pipeline.
// For every frame the testbench computes its own bit-exact reference: the
// radix-2 decimation-in-time flow graph in natural input order with twiddles
// quantised from $cos/$sin (6 fraction bits) and each twiddle product
// truncated, using integer operators. Every output must match it, must come
// with the right out_bin (bit-reversed position), must lie within a small
// distance of the exact floating-point DFT, and, while the input streams
// without gaps, must appear 2N - 1 + log2(N) = 18 cycles after its sample.
// It also counts how often the design's mechanisms acted (SISO frame buffer
// output, carry skip taken, feedback words leaving a delay line, non-trivial
// twiddle products, borrows in the butterfly subtractor) and fails any that
// never did. Ends with a TB_RESULT line.
module tb_cska_fft;
  localparam int N = 8, DW = 8, L = $clog2(N), OW = DW + 2 * L - 1, LAT = 2 * N - 1 + L;
  localparam int MAXV = (1 << (DW - 1)) - 1, MINV = -(1 << (DW - 1));
  // DFT tolerance: truncation (one unit per product) plus the twiddle
  // quantisation (at most 1/128 of each input magnitude per stage).
  localparam real TOL0 = 2.0 * L;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic               out_valid;
  logic signed [OW-1:0] out_re, out_im;
  logic [L-1:0]         out_bin;

  cska_fft dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  int acc_re[$], acc_im[$], acc_cyc[$];
  int got_re[$], got_im[$], got_bin[$], got_cyc[$];

  // Mechanism counters.
  int n_siso = 0, n_skip = 0, n_feedback = 0, n_twiddle = 0, n_borrow = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid) begin
        acc_re.push_back(int'(in_re));
        acc_im.push_back(int'(in_im));
        acc_cyc.push_back(cyc);
      end
      if (out_valid) begin
        got_re.push_back(int'(out_re));
        got_im.push_back(int'(out_im));
        got_bin.push_back(int'(out_bin));
        got_cyc.push_back(cyc);
      end
      if (dut.st_valid[0]) n_siso++;
      if (dut.g_stage[1].u_stage.in_valid && dut.g_stage[1].u_stage.lower &&
          dut.g_stage[1].u_stage.u_bfly.u_add_re.bc[1] &&
          (&dut.g_stage[1].u_stage.u_bfly.u_add_re.g_blk[1].p))
        n_skip++;
      if (dut.g_stage[2].u_stage.in_valid && !dut.g_stage[2].u_stage.lower &&
          dut.g_stage[2].u_stage.started)
        n_feedback++;
      if (dut.g_stage[3].u_stage.in_valid && dut.g_stage[3].u_stage.lower &&
          dut.g_stage[3].u_stage.g_twiddle.e != 0)
        n_twiddle++;
      if (dut.g_stage[3].u_stage.in_valid && dut.g_stage[3].u_stage.lower &&
          dut.g_stage[3].u_stage.u_bfly.u_sub_re.bout)
        n_borrow++;
    end
  end

  function automatic int brev(int v, int bits);
    int r = 0;
    for (int k = 0; k < bits; k++) if (v & (1 << k)) r |= 1 << (bits - 1 - k);
    return r;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int q(real v);
    return $rtoi(v * 64.0 + ((v >= 0.0) ? 0.5 : -0.5));
  endfunction

  // Check the frame whose first sample is acc[base] against the outputs
  // got[base .. base+7].
  task automatic check_frame(int base, bit timed);
    int yr[N], yi[N], zr[N], zi[N];
    for (int i = 0; i < N; i++) begin
      yr[i] = acc_re[base + i];
      yi[i] = acc_im[base + i];
    end
    for (int s = 1; s <= L; s++) begin
      int d = N >> s;
      for (int i = 0; i < N; i++) begin
        if ((i & d) == 0) begin
          int e, c, sn, lr, li;
          e  = brev(i >> (L - s + 1), s - 1) * (N >> s);
          c  = q($cos(2.0 * 3.14159265358979 * e / N));
          sn = q(-$sin(2.0 * 3.14159265358979 * e / N));
          lr = yr[i + d]; li = yi[i + d];
          if (s > 1) begin
            int tr, ti;
            tr = (lr * c - li * sn) >>> 6;
            ti = (lr * sn + li * c) >>> 6;
            lr = tr; li = ti;
          end
          zr[i] = yr[i] + lr;     zi[i] = yi[i] + li;
          zr[i + d] = yr[i] - lr; zi[i + d] = yi[i] - li;
        end
      end
      yr = zr; yi = zi;
    end
    for (int p = 0; p < N; p++) begin
      int g = base + p, k = brev(p, L);
      real xr = 0.0, xi = 0.0, tol = TOL0;
      for (int n = 0; n < N; n++) begin
        real ang = -2.0 * 3.14159265358979 * n * k / N;
        xr += acc_re[base + n] * $cos(ang) - acc_im[base + n] * $sin(ang);
        xi += acc_re[base + n] * $sin(ang) + acc_im[base + n] * $cos(ang);
        tol += (L - 1) * (iabs(acc_re[base + n]) + iabs(acc_im[base + n])) / 128.0;
      end
      checks++;
      if (got_re[g] != yr[p] || got_im[g] != yi[p]) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: exp (%0d,%0d) got (%0d,%0d)", g, yr[p], yi[p], got_re[g], got_im[g]);
      end
      checks++;
      if (got_bin[g] != k) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: bin %0d, expected %0d", g, got_bin[g], k);
      end
      checks++;
      if ((got_re[g] - xr) > tol || (xr - got_re[g]) > tol || (got_im[g] - xi) > tol || (xi - got_im[g]) > tol) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: (%0d,%0d) far from DFT (%f,%f)", g, got_re[g], got_im[g], xr, xi);
      end
      if (timed) begin
        checks++;
        if (got_cyc[g] - acc_cyc[g] != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: latency %0d, expected %0d", g, got_cyc[g] - acc_cyc[g], LAT);
        end
      end
    end
  endtask

  task automatic send(int re, int im, bit gaps);
    @(negedge clk);
    while (gaps && ($urandom % 3 == 0)) begin
      in_valid = 0;
      @(negedge clk);
    end
    in_valid = 1;
    in_re = DW'(re);
    in_im = DW'(im);
  endtask

  task automatic send_frame(int kind, bit gaps);
    for (int n = 0; n < N; n++) begin
      int re, im;
      case (kind)
        0: begin re = (n == 0) ? 100 : 0; im = 0; end           // impulse
        1: begin re = 50; im = -30; end                          // constant
        2: begin re = (n == 0 || n == 4) ? 1 : 0;                // 0/1 patterns
                 im = (n == 0 || n == 2) ? 1 : 0; end
        3: begin re = MAXV; im = MAXV; end                         // full scale
        4: begin re = MINV; im = MINV; end
        5: begin re = (n % 2) ? MINV : MAXV; im = (n % 2) ? MAXV : MINV; end
        6: begin re = 0; im = 0; end                             // flush
        default: begin re = $signed(DW'($urandom)); im = $signed(DW'($urandom)); end
      endcase
      send(re, im, gaps);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int TIMED_FRAMES = 12;

  initial begin
    int frames;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Back to back.
    for (int f = 0; f < TIMED_FRAMES; f++) send_frame((f < 6) ? f : 7, 1'b0);
    // With gaps.
    for (int f = 0; f < 40; f++) send_frame((f < 6) ? f : 7, 1'b1);
    frames = TIMED_FRAMES + 40;
    // Flush: three zero frames push the last real frame through.
    for (int f = 0; f < 3; f++) send_frame(6, 1'b0);
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (got_re.size() < frames * N) begin
      failures++;
      $display("FAIL only %0d outputs for %0d frames", got_re.size(), frames);
    end else begin
      for (int f = 0; f < frames; f++) check_frame(f * N, f < TIMED_FRAMES - 2);
    end
    $display("mechanisms: siso=%0d skip=%0d feedback=%0d twiddle=%0d borrow=%0d",
             n_siso, n_skip, n_feedback, n_twiddle, n_borrow);
    checks += 5;
    if (n_siso == 0)     begin failures++; $display("FAIL SISO never delivered a sample"); end
    if (n_skip == 0)     begin failures++; $display("FAIL carry skip never taken"); end
    if (n_feedback == 0) begin failures++; $display("FAIL no feedback word"); end
    if (n_twiddle == 0)  begin failures++; $display("FAIL no non-trivial twiddle"); end
    if (n_borrow == 0)   begin failures++; $display("FAIL no borrow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
