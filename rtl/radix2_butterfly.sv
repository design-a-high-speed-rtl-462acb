// radix2_butterfly: the radix-2 butterfly of one FFT stage.
//
// For complex inputs a (upper) and b (lower, already multiplied by its
// twiddle) it returns sum = a + b and diff = a - b. The additions use the
// carry skip adder and the subtractions the ripple-borrow subtractor, one of
// each for the real and one for the imaginary part, as the published datapath
// splits into an adder and a subtractor fed from the carry skip adder stage.
// Inputs are W-bit two's complement; outputs are W+1 bits so nothing
// overflows. Purely combinational.
module radix2_butterfly #(
  parameter int W = 8
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W:0]   sum_re,
  output logic signed [W:0]   sum_im,
  output logic signed [W:0]   diff_re,
  output logic signed [W:0]   diff_im
);
  logic [W:0] are, aim, bre, bim;
  assign are = {a_re[W-1], a_re};
  assign aim = {a_im[W-1], a_im};
  assign bre = {b_re[W-1], b_re};
  assign bim = {b_im[W-1], b_im};

  cska #(.WIDTH(W + 1)) u_add_re (.a(are), .b(bre), .cin(1'b0), .sum(sum_re), .cout());
  cska #(.WIDTH(W + 1)) u_add_im (.a(aim), .b(bim), .cin(1'b0), .sum(sum_im), .cout());
  subtractor #(.WIDTH(W + 1)) u_sub_re (.a(are), .b(bre), .diff(diff_re), .bout());
  subtractor #(.WIDTH(W + 1)) u_sub_im (.a(aim), .b(bim), .diff(diff_im), .bout());
endmodule
