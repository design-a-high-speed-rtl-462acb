// baugh_wooley_multiplier: signed (two's complement) N x N array multiplier.
//
// Row j of the array adds the partial products a[i] & b[j] (i = 0..N-1) to the
// sums and carries of the row above, one full adder per cell, in carry-save
// form. Cells whose partial product carries a sign weight, a[N-1]b[j] and
// a[i]b[N-1] with i, j < N-1, use the complement of the AND (the NAND, the
// "gray" cells); all other cells use the AND ("white" cells), including
// a[N-1]b[N-1]. The top row starts from zero sums and carries. Each row
// delivers one low product bit. A last row of full adders ripples the
// remaining sums and carries into the high product bits, with a constant 1
// entering its carry input (weight 2^N).
// The complemented partial products leave a constant error that these two
// additions cancel: +2^N at the last row's carry input and +2^(2N-1), which
// flips the top product bit (the carry beyond bit 2N-1 is dropped).
//
// The cell arrangement, the AND/NAND split and the constant 1 into the last
// row follow the published multiplier (drawn there for N = 5); realising
// the 2^(2N-1) term as an inverted top bit is this design's own choice.
//
// Interface: p = a * b, both operands and the 2N-bit product two's complement.
// Purely combinational.
module baugh_wooley_multiplier #(
  parameter int N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // s[j][i], c[j][i]: sum and carry of cell (i, j); s has weight i + j and c
  // weight i + j + 1. Index N of s is a zero filler for the leftmost column.
  logic [N:0]   s [N];
  logic [N-1:0] c [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    assign s[j][N] = 1'b0;
    for (genvar i = 0; i < N; i++) begin : g_cell
      logic pp, sin, cin;
      if ((i == N-1) != (j == N-1)) begin : g_gray
        assign pp = ~(a[i] & b[j]);
      end else begin : g_white
        assign pp = a[i] & b[j];
      end
      if (j == 0) begin : g_top
        assign sin = 1'b0;
        assign cin = 1'b0;
      end else begin : g_inner
        assign sin = s[j-1][i+1];
        assign cin = c[j-1][i];
      end
      full_adder u_fa (.a(pp), .b(sin), .ci(cin), .s(s[j][i]), .co(c[j][i]));
    end
    assign p[j] = s[j][0];
  end

  // Final ripple row (the "F" cells): bits N .. 2N-1.
  logic [N:0]   fc;
  logic [N-1:0] fs;
  assign fc[0] = 1'b1;
  for (genvar i = 0; i < N; i++) begin : g_final
    full_adder u_fa (.a(s[N-1][i+1]), .b(c[N-1][i]), .ci(fc[i]), .s(fs[i]), .co(fc[i+1]));
  end
  assign p[2*N-1:N] = {~fs[N-1], fs[N-2:0]};
endmodule
