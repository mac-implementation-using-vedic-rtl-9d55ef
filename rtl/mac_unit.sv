// mac_unit: multiply-accumulate unit built on a Vedic multiplier.
//
// Every clock edge with ce high adds the product of the two N-bit operands
// to a 2N-bit accumulator:  q <= q + a*b,  so q = sum of a_i*b_i.
// Datapath, in order: vedic_mul (N x N Urdhva Tiryagbhyam multiplier) ->
// csa_adder (2N-bit carry-save adder, the accumulator's adder, its other
// input being the register output fed back) -> acc_reg (2N-bit register).
// Operands and accumulator are unsigned; the sum wraps modulo 2^(2N), so
// the adder's carry-out port is deliberately left unconnected.
//
// Overflow: the adder's two operands are checked with the signed-adder
// rule, "operands of the same sign giving a result of the other sign",
// i.e. on bit 2N-1 of product, accumulator and sum. When that happens on an
// accumulating edge, ovf is set and stays set until reset. The flag is
// sticky because once the accumulator has wrapped it stays wrong. Note the
// rule is the signed one: with unsigned operands it reports the
// accumulator crossing 2^(2N-1), and it does not catch every unsigned wrap
// (a product with its top bit set added to a small accumulator wraps
// silently).
//
// Timing: combinational from a, b through the multiplier and adder to the
// register; one product accepted per clock, q shows it after that edge
// (one cycle latency). rst is synchronous and active high, and clears q and
// ovf. Structure, widths (16-bit operands, 32-bit result) and the overflow
// rule follow the design this implements; the reset style, the clock-enable
// behaviour and the stickiness of ovf are this design's choices.
module mac_unit #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ce,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] q,
  output logic           ovf
);

  localparam int unsigned W = 2 * N;

  logic [W-1:0] prod;
  logic [W-1:0] acc_next;
  logic         ovf_now;
  logic         ovf_next;

  vedic_mul #(.N(N)) u_mul (
    .a(a),
    .b(b),
    .p(prod)
  );

  csa_adder #(.W(W)) u_add (
    .x   (prod),
    .y   (q),
    .z   ('0),
    .sum (acc_next),
    .cout()           // carry beyond 2N bits: the sum wraps
  );

  // Signed-adder overflow rule on the accumulator's adder.
  assign ovf_now  = (prod[W-1] == q[W-1]) && (acc_next[W-1] != prod[W-1]);
  assign ovf_next = ovf | ovf_now;

  acc_reg #(.W(W)) u_acc (
    .clk(clk),
    .rst(rst),
    .ce (ce),
    .d  (acc_next),
    .q  (q)
  );

  acc_reg #(.W(1)) u_ovf (
    .clk(clk),
    .rst(rst),
    .ce (ce),
    .d  (ovf_next),
    .q  (ovf)
  );

endmodule
