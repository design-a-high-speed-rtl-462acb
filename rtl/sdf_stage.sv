// sdf_stage: one radix-2 single-path delay feedback (SDF) stage of an N-point
// decimation-in-time FFT whose input is in natural order.
//
// Stage s (1-based) pairs the samples at frame positions i and i + D, with
// D = N / 2^s, and holds the first of each pair in a feedback delay line of D
// words. Samples arrive one per enabled cycle (in_valid):
//   * upper half (position bit D clear): the sample is pushed into the delay
//     line, and the word leaving the line, a difference stored by the previous
//     group, is sent out;
//   * lower half (position bit D set): the sample is multiplied by its twiddle
//     W_N^e, the butterfly forms upper + W*lower, which is sent out at once,
//     and upper - W*lower, which is pushed into the delay line and leaves it
//     during the next upper half.
// The twiddle exponent for position i is e = bitrev_{s-1}(i >> (log2 N - s + 1))
// * N / 2^s; stage 1 therefore only ever uses W^0 = 1 and has no multiplier.
// Chaining stages with D = N/2, N/4, ..., 1 gives the FFT with the outputs in
// bit-reversed order.
//
// Timing: each output is registered. The output for frame position p leaves
// the stage D enabled cycles after position p entered it, one clock after
// that cycle's edge; out_valid is high in the cycle after each in_valid once
// the first lower half has arrived, so the first D (meaningless) outputs after
// reset are not flagged. Words only advance on in_valid: a frame's last D
// outputs appear as the next frame's first D samples come in.
//
// Widths: input IW bits; the twiddle product has MW = IW + 1 bits (IW in stage
// 1) and the butterfly adds one more, so the output has OW = MW + 1 bits.
// Twiddles come from a table of the N/2 values of C, C+S and C-S computed at
// elaboration (fft_pkg::twiddle). The feedback structure, the delay lengths and
// the butterfly built from the carry skip adder and the subtractor follow the
// published design; the widths, the twiddle format and the valid handshake are this
// implementation's own choices.
module sdf_stage #(
  parameter int N     = 8,
  parameter int STAGE = 1,
  parameter int IW    = 8,
  parameter int TW    = 8,
  localparam int MW   = (STAGE == 1) ? IW : IW + 1,
  localparam int OW   = MW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im
);
  localparam int L = $clog2(N);
  localparam int D = N >> STAGE;

  typedef logic signed [OW-1:0] ow_t;

  logic [L-1:0] cnt;      // frame position of the incoming sample
  logic         lower;    // incoming sample is the lower input of its pair
  logic         started;  // first lower half seen since reset
  ow_t          dl_re [D];
  ow_t          dl_im [D];
  ow_t          head_re, head_im;

  assign lower   = cnt[L-STAGE];
  assign head_re = dl_re[D-1];
  assign head_im = dl_im[D-1];

  // Twiddle table: entry k holds W_N^k as C, C+S or C-S (sel 0, 2, 3).
  localparam int NT = N / 2;
  typedef logic signed [TW:0] tw_t;
  typedef tw_t tw_tab_t [NT];

  function automatic tw_tab_t make_table(int sel);
    tw_tab_t t;
    for (int k = 0; k < NT; k++) t[k] = tw_t'(fft_pkg::twiddle(N, TW, k, sel));
    return t;
  endfunction

  // Twiddled lower input.
  logic signed [MW-1:0] lo_re, lo_im;

  if (STAGE == 1) begin : g_no_twiddle
    assign lo_re = in_re;
    assign lo_im = in_im;
  end else begin : g_twiddle
    localparam tw_tab_t C_TAB   = make_table(0);
    localparam tw_tab_t CPS_TAB = make_table(2);
    localparam tw_tab_t CMS_TAB = make_table(3);

    logic [L-2:0] e;  // twiddle exponent, 0 .. N/2-1
    assign e = (L-1)'(fft_pkg::bit_reverse(32'(cnt >> (L - STAGE + 1)), STAGE - 1)
                      * (N >> STAGE));

    tw_t c_full;
    assign c_full = C_TAB[e];

    complex_multiplier #(.DW(IW), .TW(TW)) u_cmul (
      .x  (in_re),
      .y  (in_im),
      .c  (c_full[TW-1:0]),
      .cps(CPS_TAB[e]),
      .cms(CMS_TAB[e]),
      .r  (lo_re),
      .i  (lo_im)
    );
  end

  logic signed [OW-1:0] sum_re, sum_im, diff_re, diff_im;
  radix2_butterfly #(.W(MW)) u_bfly (
    .a_re   (head_re[MW-1:0]),
    .a_im   (head_im[MW-1:0]),
    .b_re   (lo_re),
    .b_im   (lo_im),
    .sum_re (sum_re),
    .sum_im (sum_im),
    .diff_re(diff_re),
    .diff_im(diff_im)
  );

  ow_t push_re, push_im;
  assign push_re = lower ? diff_re : OW'(in_re);
  assign push_im = lower ? diff_im : OW'(in_im);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      started   <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      for (int k = 0; k < D; k++) begin
        dl_re[k] <= '0;
        dl_im[k] <= '0;
      end
    end else begin
      out_valid <= in_valid && (started || lower);
      if (in_valid) begin
        cnt      <= cnt + 1'b1;
        started  <= started || lower;
        out_re   <= lower ? sum_re : head_re;
        out_im   <= lower ? sum_im : head_im;
        dl_re[0] <= push_re;
        dl_im[0] <= push_im;
        for (int k = 1; k < D; k++) begin
          dl_re[k] <= dl_re[k-1];
          dl_im[k] <= dl_im[k-1];
        end
      end
    end
  end
endmodule
