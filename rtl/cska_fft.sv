// cska_fft: streaming N-point radix-2 decimation-in-time FFT built from carry
// skip adders, a single-path delay feedback (SDF) pipeline and a three-
// multiplier complex product.
//
// Data path: the real and imaginary input words each pass through a serial-in
// serial-out shift register of N stages, which buffers one frame, and then
// through log2(N) SDF stages with feedback delays of N/2, N/4, ..., 1 words.
// Each stage folds the N/2 butterflies of its column of the FFT flow graph
// onto a single butterfly (carry skip adder for the sums, ripple-borrow
// subtractor for the differences), and from stage 2 on a complex multiplier
// made of three signed array multipliers applies the twiddle factors.
//
// Interface: one complex sample per cycle with in_valid high, frames of N
// samples back to back in natural order starting with the first valid sample
// after reset. Results come out one per out_valid, in bit-reversed order;
// out_bin gives the frequency index k of the bin on the output. Results are
// the exact DFT sum X[k] = sum_n x[n] W_N^(nk) up to the truncation of each
// twiddle product to an integer; no scaling is applied, so the output has
// DW + 2*log2(N) - 1 bits.
//
// Timing: a sample leaves the input register N valid samples after it entered
// and then spends N/2, N/4, ..., 1 valid samples plus one register clock in
// each stage. With a continuous input stream, X at frame position p of a frame
// whose first sample entered at cycle t0 appears 2N - 1 + log2(N) cycles after
// t0 + p (it is out_valid in that cycle). Only valid cycles move data: to flush
// the last frame, keep feeding samples (for example zeros).
//
// What follows the published design: the SISO input register, the radix-2 DIT algorithm,
// the SDF pipeline with delays N/2, N/4, N/8 for the 8-point default, the carry
// skip adder, the half/full subtractor, the AND/NAND array multiplier and the
// three-multiplier complex product; the 8-bit words and 8 points are its sizes.
// The widths beyond the input, the twiddle format, the bit-reversed output
// order with an index output and the valid handshake are this design's own.
module cska_fft #(
  parameter int N  = fft_pkg::FFT_N,
  parameter int DW = fft_pkg::DATA_W,
  parameter int TW = fft_pkg::TW_W,
  localparam int L  = $clog2(N),
  localparam int OW = fft_pkg::stage_out_w(DW, L)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im,
  output logic        [L-1:0]  out_bin
);
  // Input frame buffer, one register per part.
  logic [DW-1:0] siso_re, siso_im;
  logic          siso_valid, siso_valid_im;

  siso_shift_register #(.WIDTH(DW), .DEPTH(N)) u_siso_re (
    .clk, .rst_n, .shift_en(in_valid), .sin(in_re), .sout(siso_re), .sout_valid(siso_valid)
  );
  siso_shift_register #(.WIDTH(DW), .DEPTH(N)) u_siso_im (
    .clk, .rst_n, .shift_en(in_valid), .sin(in_im), .sout(siso_im), .sout_valid(siso_valid_im)
  );

  // Stage interconnect; st_*[s] is the input of stage s+1, sign-extended to OW.
  logic                 st_valid [L+1];
  logic signed [OW-1:0] st_re    [L+1];
  logic signed [OW-1:0] st_im    [L+1];

  // Both registers shift together, so their valid flags always agree.
  assign st_valid[0] = siso_valid & siso_valid_im;

  always_ff @(posedge clk)
    if (rst_n) assert (siso_valid == siso_valid_im)
      else $error("real and imaginary input registers out of step");
  assign st_re[0]    = OW'(signed'(siso_re));
  assign st_im[0]    = OW'(signed'(siso_im));

  for (genvar s = 1; s <= L; s++) begin : g_stage
    localparam int IWS = fft_pkg::stage_in_w(DW, s);
    localparam int OWS = fft_pkg::stage_out_w(DW, s);
    logic signed [OWS-1:0] o_re, o_im;

    sdf_stage #(.N(N), .STAGE(s), .IW(IWS), .TW(TW)) u_stage (
      .clk,
      .rst_n,
      .in_valid (st_valid[s-1]),
      .in_re    (st_re[s-1][IWS-1:0]),
      .in_im    (st_im[s-1][IWS-1:0]),
      .out_valid(st_valid[s]),
      .out_re   (o_re),
      .out_im   (o_im)
    );
    assign st_re[s] = OW'(o_re);
    assign st_im[s] = OW'(o_im);
  end

  assign out_valid = st_valid[L];
  assign out_re    = st_re[L];
  assign out_im    = st_im[L];

  // Output position counter; position p carries bin bitrev(p).
  logic [L-1:0] opos;
  always_ff @(posedge clk) begin
    if (!rst_n)         opos <= '0;
    else if (out_valid) opos <= opos + 1'b1;
  end

  always_comb
    for (int k = 0; k < L; k++) out_bin[k] = opos[L-1-k];
endmodule
