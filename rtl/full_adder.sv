// full_adder: one-bit full adder, the cell from which the carry skip adder's
// ripple blocks and the signed array multiplier are built.
// sum = a ^ b ^ ci; co is the majority of the three inputs. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (ci & (a ^ b));
endmodule
