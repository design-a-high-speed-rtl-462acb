// fft_pkg: constants and elaboration-time helpers shared by the FFT modules.
//
// The default sizes are those of the 8-point, 8-bit design: eight samples per
// frame (three radix-2 stages, delays N/2, N/4, N/8) and 8-bit real and
// imaginary input words. The twiddle word width and its fixed-point scaling are
// this design's own choice: twiddles are signed TW_W-bit numbers with TW_W-2
// fraction bits, so +1.0 and -1.0 are both representable.
package fft_pkg;

  localparam int FFT_N  = 8;  // points per frame
  localparam int DATA_W = 8;  // input word width (real and imaginary each)
  localparam int TW_W   = 8;  // twiddle word width

  // Reverse the low `bits` bits of v.
  function automatic int unsigned bit_reverse(int unsigned v, int bits);
    int unsigned r = 0;
    for (int k = 0; k < bits; k++)
      if (v[k]) r |= (1 << (bits - 1 - k));
    return r;
  endfunction

  // Width of the words entering radix-2 stage `s` (1-based) for input width dw.
  // Stage 1 multiplies by W^0 only, so it needs no multiplier and grows one bit;
  // every later stage grows one bit in the twiddle product and one in the
  // butterfly.
  function automatic int stage_in_w(int dw, int s);
    return (s <= 1) ? dw : dw + 1 + 2 * (s - 2);
  endfunction

  function automatic int stage_out_w(int dw, int s);
    return (s <= 1) ? dw + 1 : stage_in_w(dw, s) + 2;
  endfunction

  // Twiddle W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) in the fixed-point format
  // above, rounded to nearest. sel 0 gives C (real part), 1 gives S (imaginary
  // part), 2 gives C+S and 3 gives C-S; the last two feed the three-multiplier
  // complex product directly.
  function automatic int twiddle(int n, int tw, int k, int sel);
    real ang, cr, sr, scale;
    int  c, s;
    ang   = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    scale = real'(1 << (tw - 2));
    cr    = $cos(ang) * scale;
    sr    = -$sin(ang) * scale;
    c     = $rtoi(cr + ((cr >= 0.0) ? 0.5 : -0.5));
    s     = $rtoi(sr + ((sr >= 0.0) ? 0.5 : -0.5));
    case (sel)
      0:       return c;
      1:       return s;
      2:       return c + s;
      default: return c - s;
    endcase
  endfunction

endpackage
