// tb_acc_reg: self-checking test of the accumulator register.
//
// Applies random d, ce and rst for many clock cycles to a 32-bit instance
// and compares q after every rising edge with a reference register kept in
// the testbench: reset clears, ce loads, otherwise q holds. Counts each
// case and fails if any of the three never happened.
module tb_acc_reg;

  int checks = 0;
  int failures = 0;
  int n_rst = 0, n_load = 0, n_hold = 0;

  logic        clk;
  initial clk = 1'b0;
  logic        rst, ce;
  logic [31:0] d, q, ref_q;

  acc_reg dut (.clk(clk), .rst(rst), .ce(ce), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; d = '0; ref_q = '0;
    @(posedge clk);
    #1;
    checks++;
    if (q !== 32'h0) begin failures++; $display("FAIL reset q=%h", q); end
    for (int i = 0; i < 1000; i++) begin
      rst = ($urandom_range(0, 15) == 0);
      ce  = $urandom_range(0, 1) == 1;
      d   = $urandom;
      @(posedge clk);
      if (rst)     begin ref_q = '0; n_rst++;  end
      else if (ce) begin ref_q = d;  n_load++; end
      else         n_hold++;
      #1;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL cycle %0d rst=%b ce=%b d=%h q=%h exp=%h", i, rst, ce, d, q, ref_q);
      end
    end
    checks++;
    if (n_rst == 0 || n_load == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage rst=%0d load=%0d hold=%0d", n_rst, n_load, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
