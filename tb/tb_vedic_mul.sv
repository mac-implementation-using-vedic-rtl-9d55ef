// tb_vedic_mul: self-checking test of the Urdhva Tiryagbhyam multiplier.
//
// Checks the default 16 x 16 instance on corner and random operands, an
// 8 x 8 and a 4 x 4 instance exhaustively, against the simulator's own
// multiplication. The 32 x 32 size is exercised through the MAC unit in
// tb_mac_configs.
module tb_vedic_mul;

  int checks = 0;
  int failures = 0;

  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  vedic_mul                dut   (.a(a16), .b(b16), .p(p16));
  vedic_mul #(.N(8))       dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul #(.N(4))       dut4  (.a(a4),  .b(b4),  .p(p4));

  task automatic check16(input logic [15:0] ai, bi);
    logic [31:0] exp;
    a16 = ai; b16 = bi;
    #1;
    exp = 32'(ai) * 32'(bi);
    checks++;
    if (p16 !== exp) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h got=%h exp=%h", ai, bi, p16, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] corners[6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'hAAAA, 16'h5555};
    foreach (corners[i])
      foreach (corners[j])
        check16(corners[i], corners[j]);
    repeat (5000) check16(16'($urandom), 16'($urandom));

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 a=%0d b=%0d got=%0d", i, j, p8);
        end
      end
    end

    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++;
          $display("FAIL N=4 a=%0d b=%0d got=%0d", i, j, p4);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
