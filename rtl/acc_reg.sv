// acc_reg: W-bit accumulator register with clock enable and reset.
//
// On a rising clk edge: rst high clears q to zero; otherwise ce high loads
// d; otherwise q holds. Reset is synchronous and takes priority over ce.
// The register width follows the MAC this serves (32 bits for 16-bit
// operands) and the signal names clk, rst and ce follow its published
// simulation trace; synchronous, active-high reset and the load-enable
// meaning of ce are this design's choices.
module acc_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ce) q <= d;
  end

endmodule
