// cska: carry skip adder.
//
// The operands are cut into blocks of BLOCK bits. Inside a block the carry
// ripples through full adders. Beside each block a skip path forwards the
// block's carry-in straight to its carry-out when every bit of the block
// propagates (a[i] ^ b[i] = 1 for all i), so a carry crossing many blocks
// passes one AND-OR pair per block instead of every full adder:
//   c_out(block) = c_ripple(block) | (P(block) & c_in(block))
// When P(block) is 1 the ripple carry equals c_in anyway, so the OR form gives
// the same sum as a 2:1 skip multiplexer.
//
// The carry skip adder as the adder of the FFT datapath follows the published design;
// the uniform block size (4 bits by default) and the AND-OR skip gate are this
// design's own choices. WIDTH need not be a multiple of BLOCK: the last block
// is then shorter.
//
// Interface: sum = a + b + cin (WIDTH bits), cout the carry out of the top bit.
// Purely combinational.
module cska #(
  parameter int WIDTH = 8,
  parameter int BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  // bc[k] is the carry into block k; bc[NBLK] is the adder's carry out.
  logic [NBLK:0] bc;
  assign bc[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int LO = k * BLOCK;
    localparam int BW = ((LO + BLOCK) > WIDTH) ? (WIDTH - LO) : BLOCK;

    logic [BW:0]   rc;  // ripple carries inside the block
    logic [BW-1:0] p;   // bit propagate signals
    assign rc[0] = bc[k];

    for (genvar i = 0; i < BW; i++) begin : g_bit
      full_adder u_fa (
        .a (a[LO+i]),
        .b (b[LO+i]),
        .ci(rc[i]),
        .s (sum[LO+i]),
        .co(rc[i+1])
      );
      assign p[i] = a[LO+i] ^ b[LO+i];
    end

    // Skip logic.
    assign bc[k+1] = rc[BW] | ((&p) & bc[k]);
  end

  assign cout = bc[NBLK];
endmodule
