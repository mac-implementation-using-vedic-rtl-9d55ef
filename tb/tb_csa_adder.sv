// tb_csa_adder: self-checking test of the three-operand carry-save adder.
//
// Drives a 32-bit instance (the accumulator's width) and an 8-bit one with
// corner operands (all zeros, all ones, alternating bits) and random ones,
// and compares {cout, sum} with the three-operand sum computed by the
// simulator's own 64-bit arithmetic. The 8-bit instance is also checked
// exhaustively over x and y with z from a few fixed values.
module tb_csa_adder;

  int checks = 0;
  int failures = 0;

  logic [31:0] x, y, z, s;
  logic [1:0]  co;
  logic [7:0]  x8, y8, z8, s8;
  logic [1:0]  co8;

  csa_adder #(.W(32)) dut   (.x(x),  .y(y),  .z(z),  .sum(s),  .cout(co));
  csa_adder #(.W(8))  dut8  (.x(x8), .y(y8), .z(z8), .sum(s8), .cout(co8));

  task automatic check32(input logic [31:0] xi, yi, zi);
    logic [33:0] exp;
    x = xi; y = yi; z = zi;
    #1;
    exp = 34'(xi) + 34'(yi) + 34'(zi);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      $display("FAIL W=32 x=%h y=%h z=%h got=%h exp=%h", xi, yi, zi, {co, s}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [31:0] corners[5] = '{32'h0, 32'hFFFF_FFFF, 32'hAAAA_AAAA, 32'h5555_5555, 32'h8000_0001};
    foreach (corners[i])
      foreach (corners[j])
        foreach (corners[k])
          check32(corners[i], corners[j], corners[k]);
    repeat (2000) check32($urandom, $urandom, $urandom);
    // Two-operand use, as in the accumulator
    repeat (500) check32($urandom, $urandom, 32'h0);

    foreach (corners[k]) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          logic [9:0] exp8;
          x8 = 8'(i); y8 = 8'(j); z8 = corners[k][7:0];
          #1;
          exp8 = 10'(x8) + 10'(y8) + 10'(z8);
          checks++;
          if ({co8, s8} !== exp8) begin
            failures++;
            if (failures < 10)
              $display("FAIL W=8 x=%h y=%h z=%h got=%h exp=%h", x8, y8, z8, {co8, s8}, exp8);
          end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
