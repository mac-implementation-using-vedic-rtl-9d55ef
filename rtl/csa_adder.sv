// csa_adder: three-operand carry-save adder.
//
// Adds three W-bit unsigned operands. A row of W full adders first reduces
// x, y and z to a partial-sum vector and a carry vector with no carry moving
// between bit positions; only the last step, one carry-propagate addition
// of sum + (carry << 1), lets carries travel. The full result is W+2 bits
// wide: `sum` holds the low W bits and `cout` the two bits above them.
//
// Purely combinational, no clock. The carry-save principle (carries
// propagate only in the last step) follows the design this unit comes
// from; leaving the kind of carry-propagate adder in the last step to
// synthesis is this design's choice.
// When only two operands are needed, tie z to zero.
module csa_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [1:0]   cout
);

  // Carry-save stage: one full adder per bit, carries kept apart.
  logic [W-1:0] ps;  // partial sums, weight 2^i
  logic [W-1:0] cv;  // carries, weight 2^(i+1)

  assign ps = x ^ y ^ z;
  assign cv = (x & y) | (x & z) | (y & z);

  // Carry-propagate stage: the only place where carries travel.
  logic [W+1:0] res;

  assign res = {2'b00, ps} + {1'b0, cv, 1'b0};

  assign sum  = res[W-1:0];
  assign cout = res[W+1:W];

endmodule
