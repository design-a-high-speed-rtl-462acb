// subtractor: ripple-borrow subtractor, diff = a - b.
//
// Bit 0 is a half subtractor (no borrow in); every higher bit is a full
// subtractor taking the borrow of the bit below, so the number of full
// subtractors follows the word length, as in the published design. Half subtractor:
// d = a ^ b, borrow = ~a & b. Full subtractor: d = a ^ b ^ bin,
// borrow = (~a & b) | (~(a ^ b) & bin).
//
// Interface: diff = a - b modulo 2^WIDTH, bout = 1 when a < b as unsigned
// numbers. Works unchanged for two's complement operands of WIDTH bits.
// Purely combinational.
module subtractor #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff,
  output logic             bout
);
  logic [WIDTH:1] br;  // br[i] is the borrow into bit i

  // Half subtractor on bit 0.
  assign diff[0] = a[0] ^ b[0];
  assign br[1]   = ~a[0] & b[0];

  // Full subtractors on bits 1 .. WIDTH-1.
  for (genvar i = 1; i < WIDTH; i++) begin : g_fs
    assign diff[i]  = a[i] ^ b[i] ^ br[i];
    assign br[i+1]  = (~a[i] & b[i]) | (~(a[i] ^ b[i]) & br[i]);
  end

  assign bout = br[WIDTH];
endmodule
