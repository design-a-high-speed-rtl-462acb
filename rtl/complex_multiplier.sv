// complex_multiplier: (x + jy) * (C + jS) with three real multiplications.
//
// Instead of the textbook four products (xC, yS, xS, yC) the product is formed
// as
//   R = y(C - S) + C(x - y) = xC - yS
//   I = x(C + S) - C(x - y) = xS + yC
// so one multiplier is traded for an extra pre-subtraction (x - y). For a
// twiddle factor C + S and C - S are constants and come precomputed from the
// twiddle table. The three products use the signed array multiplier, the sum
// for R the carry skip adder, and the differences (x - y and the one for I)
// the ripple-borrow subtractor. This arrangement follows the published complex
// multiplier structure.
//
// Number formats (this design's choice): x, y are DW-bit two's complement
// integers; C is TW bits and C+S, C-S are TW+1 bits, all with TW-2 fraction
// bits. R and I are computed exactly, then shifted right by TW-2 bits
// (truncation toward minus infinity) and returned on DW+1 bits, which holds
// any |x + jy| rotation by a unit twiddle.
//
// Purely combinational.
module complex_multiplier #(
  parameter int DW = 8,
  parameter int TW = 8
) (
  input  logic signed [DW-1:0] x,    // real part of the data
  input  logic signed [DW-1:0] y,    // imaginary part of the data
  input  logic signed [TW-1:0] c,    // C
  input  logic signed [TW:0]   cps,  // C + S
  input  logic signed [TW:0]   cms,  // C - S
  output logic signed [DW:0]   r,    // real part of the product
  output logic signed [DW:0]   i     // imaginary part of the product
);
  localparam int MW  = (DW > TW) ? DW + 1 : TW + 1;  // multiplier operand width
  localparam int PW  = 2 * MW;                       // product width
  localparam int TWF = TW - 2;                       // twiddle fraction bits

  // x - y on DW+1 bits.
  logic [DW:0] xmy;
  subtractor #(.WIDTH(DW + 1)) u_xmy (
    .a({x[DW-1], x}), .b({y[DW-1], y}), .diff(xmy), .bout()
  );

  logic [MW-1:0] xe, ye, ce, cpse, cmse, xmye;
  assign xe   = MW'(x);
  assign ye   = MW'(y);
  assign ce   = MW'(c);
  assign cpse = MW'(cps);
  assign cmse = MW'(cms);
  assign xmye = MW'(signed'(xmy));

  logic [PW-1:0] m_xcps, m_ycms, m_cxmy;
  baugh_wooley_multiplier #(.N(MW)) u_m1 (.a(xe),   .b(cpse), .p(m_xcps));
  baugh_wooley_multiplier #(.N(MW)) u_m2 (.a(ye),   .b(cmse), .p(m_ycms));
  baugh_wooley_multiplier #(.N(MW)) u_m3 (.a(xmye), .b(ce),   .p(m_cxmy));

  logic [PW-1:0] r_full, i_full;
  cska #(.WIDTH(PW)) u_radd (.a(m_ycms), .b(m_cxmy), .cin(1'b0), .sum(r_full), .cout());
  subtractor #(.WIDTH(PW)) u_isub (.a(m_xcps), .b(m_cxmy), .diff(i_full), .bout());

  assign r = r_full[TWF +: DW + 1];
  assign i = i_full[TWF +: DW + 1];
endmodule
