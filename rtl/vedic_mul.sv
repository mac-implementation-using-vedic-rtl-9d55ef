// vedic_mul: unsigned N x N multiplier by the Urdhva Tiryagbhyam
// ("vertically and crosswise") method.
//
// The multiplier is built level by level. At level 1 the operands are cut
// into 2-bit digits and every digit pair a_i x b_j is multiplied by a 2 x 2
// cell (vedic_2x2). Each higher level doubles the digit size S: an S x S
// product of digits a = {aH, aL}, b = {bH, bL} (H = S/2 bits per half) is
// assembled from four H x H products of the level below, the vertical ones
// aL*bL and aH*bH and the crosswise ones aH*bL and aL*bH. The low H bits of
// aL*bL are the low H bits of the result. The other three terms, each 3H
// bits wide once aligned,
//     aH*bL,  aL*bH,  {aH*bH, upper half of aL*bL}
// are added by one carry-save adder (csa_adder), so carries propagate once
// per level; the sum is the upper 3H bits of the result and never carries
// beyond them. After log2(N) levels one product of N-bit digits remains.
//
// Purely combinational: p = a * b. N must be a power of two, at least 2;
// the default 16 is the multiplier size of the MAC it serves. This
// four-quarter structure with a 2 x 2 base cell is the usual form of this
// multiplier and is this design's choice: only the method's name is given
// for it.
module vedic_mul #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned LEVELS = $clog2(N);

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("vedic_mul: N=%0d must be a power of two >= 2", N);
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned S = 1 << l;   // digit size at this level
    localparam int unsigned M = N / S;    // digits per operand
    localparam int unsigned H = S / 2;

    // prod[i][j] = (digit i of a) * (digit j of b), 2S bits
    logic [2*S-1:0] prod [M][M];

    for (genvar i = 0; i < M; i++) begin : g_i
      for (genvar j = 0; j < M; j++) begin : g_j
        if (l == 1) begin : g_cell
          vedic_2x2 u_cell (
            .a(a[2*i +: 2]),
            .b(b[2*j +: 2]),
            .p(prod[i][j])
          );
        end else begin : g_comb
          logic [S-1:0]   q_ll, q_hl, q_lh, q_hh;
          logic [3*H-1:0] upper;
          logic [1:0]     upper_co;

          assign q_ll = g_lvl[l-1].prod[2*i][2*j];          // aL*bL
          assign q_hl = g_lvl[l-1].prod[2*i+1][2*j];        // aH*bL
          assign q_lh = g_lvl[l-1].prod[2*i][2*j+1];        // aL*bH
          assign q_hh = g_lvl[l-1].prod[2*i+1][2*j+1];      // aH*bH

          csa_adder #(.W(3*H)) u_csa (
            .x   ({{H{1'b0}}, q_hl}),
            .y   ({{H{1'b0}}, q_lh}),
            .z   ({q_hh, q_ll[S-1:H]}),
            .sum (upper),
            .cout(upper_co)
          );

          assign prod[i][j] = {upper, q_ll[H-1:0]};

          // The upper 3H bits of an S x S product never carry further.
          always_comb begin
            assert (upper_co == 2'b00) else $error("vedic_mul: carry out of product");
          end
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0][0];

endmodule
