// vedic_2x2: 2 x 2 bit Urdhva Tiryagbhyam multiplier, the base cell of
// vedic_mul.
//
// The "vertically and crosswise" rule applied to two 2-bit numbers: the
// right column is the vertical product a0*b0, the middle column the
// crosswise sum a1*b0 + a0*b1, and the left column the vertical product
// a1*b1 plus the carry from the middle column. Two half adders do the
// additions. Combinational; p = a * b, unsigned.
//
// The base-cell size and its half-adder form are this design's choices:
// only the name of the method is given for the multiplier.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic v0, x1, x2, v1, c1;

  always_comb begin
    v0   = a[0] & b[0];        // vertical, column 0
    x1   = a[1] & b[0];        // crosswise, column 1
    x2   = a[0] & b[1];
    v1   = a[1] & b[1];        // vertical, column 2
    c1   = x1 & x2;            // half adder on column 1
    p[0] = v0;
    p[1] = x1 ^ x2;
    p[2] = v1 ^ c1;            // half adder on column 2
    p[3] = v1 & c1;
  end

endmodule
