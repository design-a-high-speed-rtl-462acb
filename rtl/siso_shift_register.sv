// siso_shift_register: serial-in serial-out shift register of DEPTH stages,
// each WIDTH bits wide, that buffers one frame of input samples in front of the
// FFT pipeline.
//
// Every cycle with shift_en high the register moves one place: sin enters
// stage 0 and the oldest sample, entered DEPTH shifts earlier, appears on
// sout in that same cycle (sout is the last stage's flip-flops). sout_valid
// marks those cycles once the register has been filled, so the samples seen
// while the reset contents drain out are never flagged. Latency: DEPTH
// shifts. All stages reset to zero (active-low synchronous reset).
//
// The depth of eight stages for an 8-point frame follows the published design; the
// word-wide stages, the shift enable and the valid flag are this design's own
// choices.
module siso_shift_register #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [WIDTH-1:0] sin,
  output logic [WIDTH-1:0] sout,
  output logic             sout_valid
);
  logic [WIDTH-1:0]         q [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] fill;  // shifts seen, saturating at DEPTH

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) q[k] <= '0;
      fill <= '0;
    end else if (shift_en) begin
      q[0] <= sin;
      for (int k = 1; k < DEPTH; k++) q[k] <= q[k-1];
      if (fill != DEPTH[$clog2(DEPTH+1)-1:0]) fill <= fill + 1'b1;
    end
  end

  assign sout       = q[DEPTH-1];
  assign sout_valid = shift_en && (fill == DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
