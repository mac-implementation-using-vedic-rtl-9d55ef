// tb_mac_unit: end-to-end test of the multiply-accumulate unit at its
// default size (16-bit operands, 32-bit accumulator).
//
// A reference model in the testbench keeps its own accumulator with 64-bit
// arithmetic and its own overflow flag, computed as "the signed 64-bit sum
// of product and accumulator does not fit in 32 signed bits". The test:
//   1. reset, then the operand sequence 0,1,2,3,4 on both inputs, which
//      must give q = 0, 1, 5, 14, 30 (sum of squares);
//   2. a latency check: q must not change before the clock edge and must
//      show the new sum right after it (one product per clock);
//   3. random operands with random ce and occasional reset, including runs
//      of large operands that push the accumulator past 2^31 so that the
//      overflow flag is set.
// Every rising edge the DUT's q and ovf are compared with the model. The
// mechanisms counted are accumulate, hold (ce low), reset and overflow
// set; each must happen at least once.
module tb_mac_unit;

  int checks = 0;
  int failures = 0;
  int n_acc = 0, n_hold = 0, n_rst = 0, n_ovf = 0;

  logic        clk;
  initial clk = 1'b0;
  logic        rst, ce;
  logic [15:0] a, b;
  logic [31:0] q;
  logic        ovf;

  logic [31:0] m_q;
  logic        m_ovf;

  mac_unit dut (.clk(clk), .rst(rst), .ce(ce), .a(a), .b(b), .q(q), .ovf(ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one cycle: drive inputs, clock, update the model, compare.
  task automatic step(input logic r, input logic e, input logic [15:0] ai, bi);
    longint p, s;
    logic [31:0] q_before;
    rst = r; ce = e; a = ai; b = bi;
    #1;
    q_before = q;
    @(posedge clk);
    // Model
    if (r) begin
      m_q = '0; m_ovf = 1'b0; n_rst++;
    end else if (e) begin
      p = longint'(ai) * longint'(bi);
      s = longint'(signed'(32'(p))) + longint'(signed'(m_q));
      if (s > 64'sd2147483647 || s < -64'sd2147483648) begin
        if (!m_ovf) n_ovf++;
        m_ovf = 1'b1;
      end
      m_q = 32'(longint'(m_q) + p);
      n_acc++;
    end else begin
      n_hold++;
    end
    // Just before the edge q still held the old value (checked at #1 after
    // the inputs changed); right after it q must carry the new one.
    #1;
    checks++;
    if (q !== m_q || ovf !== m_ovf) begin
      failures++;
      if (failures < 20)
        $display("FAIL rst=%b ce=%b a=%0d b=%0d q=%h ovf=%b exp q=%h ovf=%b (before %h)",
                 r, e, ai, bi, q, ovf, m_q, m_ovf, q_before);
    end
  endtask

  initial begin
    m_q = '0; m_ovf = 1'b0;
    rst = 1'b1; ce = 1'b1; a = '0; b = '0;

    // 1. Reset, then the sum-of-squares sequence.
    step(1'b1, 1'b1, 16'd0, 16'd0);
    begin
      static logic [31:0] expect_q[5] = '{32'd0, 32'd1, 32'd5, 32'd14, 32'd30};
      for (int i = 0; i < 5; i++) begin
        step(1'b0, 1'b1, 16'(i), 16'(i));
        checks++;
        if (q !== expect_q[i]) begin
          failures++;
          $display("FAIL sequence step %0d q=%0d exp=%0d", i, q, expect_q[i]);
        end
      end
    end

    // 2. Latency: with new operands applied, q must hold until the edge,
    //    then change on it.
    rst = 1'b0; ce = 1'b1; a = 16'd7; b = 16'd9;
    #2;
    checks++;
    if (q !== 32'd30) begin failures++; $display("FAIL q changed before clock edge"); end
    @(posedge clk);
    m_q = m_q + 32'd63; n_acc++;
    #1;
    checks++;
    if (q !== 32'd93) begin failures++; $display("FAIL q=%0d one edge later, exp 93", q); end

    // 3. Random traffic, with phases of large operands to reach overflow.
    for (int round = 0; round < 8; round++) begin
      step(1'b1, 1'b0, 16'($urandom), 16'($urandom));
      for (int i = 0; i < 300; i++)
        step(1'b0, $urandom_range(0, 3) != 0, 16'($urandom), 16'($urandom));
      for (int i = 0; i < 200; i++)
        step(1'b0, $urandom_range(0, 3) != 0, 16'($urandom_range(60000, 65535)),
             16'($urandom_range(60000, 65535)));
      for (int i = 0; i < 100; i++)
        step(1'b0, $urandom_range(0, 3) != 0, 16'($urandom_range(0, 255)),
             16'($urandom_range(0, 255)));
    end

    checks++;
    if (n_acc == 0 || n_hold == 0 || n_rst == 0 || n_ovf == 0) begin
      failures++;
      $display("FAIL coverage: accumulate=%0d hold=%0d reset=%0d overflow=%0d",
               n_acc, n_hold, n_rst, n_ovf);
    end
    $display("mechanisms: accumulate=%0d hold=%0d reset=%0d overflow=%0d",
             n_acc, n_hold, n_rst, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
