// tb_mac_configs: the MAC unit in its two other evaluated sizes.
//
// * N = 8 (8-bit operands, 16-bit accumulator): the published simulation
//   trace of this unit. After reset, operands a = b = 0, 1, 2, 3, 4 on
//   successive clocks give q = 0, 1, 5, 14, 30. Then random traffic.
// * N = 32 (32-bit operands, 64-bit accumulator): random traffic, with
//   runs of large operands to set the overflow flag.
// Both are compared every clock with a reference model using 128-bit
// arithmetic; overflow is modelled as "the signed sum of product and
// accumulator does not fit in 2N signed bits", taken from a sum one bit
// wider than the accumulator.
module tb_mac_configs;

  int checks = 0;
  int failures = 0;
  int n_ovf8 = 0, n_ovf32 = 0;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  // N = 8 instance
  logic        rst8, ce8, ovf8;
  logic [7:0]  a8, b8;
  logic [15:0] q8, m_q8;
  logic        m_ovf8;
  mac_unit #(.N(8)) dut8 (.clk(clk), .rst(rst8), .ce(ce8), .a(a8), .b(b8), .q(q8), .ovf(ovf8));

  // N = 32 instance
  logic        rst32, ce32, ovf32;
  logic [31:0] a32, b32;
  logic [63:0] q32, m_q32;
  logic        m_ovf32;
  mac_unit #(.N(32)) dut32 (.clk(clk), .rst(rst32), .ce(ce32), .a(a32), .b(b32), .q(q32), .ovf(ovf32));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock for both instances: drive, clock, model, compare.
  task automatic step(input logic r8, e8, input logic [7:0] x8, y8,
                      input logic r32, e32, input logic [31:0] x32, y32);
    logic [16:0] s8;
    logic [64:0] s32;
    logic [15:0] p8;
    logic [63:0] p32;
    rst8 = r8; ce8 = e8; a8 = x8; b8 = y8;
    rst32 = r32; ce32 = e32; a32 = x32; b32 = y32;
    @(posedge clk);
    p8  = 16'(x8) * 16'(y8);
    p32 = 64'(x32) * 64'(y32);
    if (r8) begin
      m_q8 = '0; m_ovf8 = 1'b0;
    end else if (e8) begin
      s8 = {p8[15], p8} + {m_q8[15], m_q8};
      if (s8[16] != s8[15]) begin
        if (!m_ovf8) n_ovf8++;
        m_ovf8 = 1'b1;
      end
      m_q8 = s8[15:0];
    end
    if (r32) begin
      m_q32 = '0; m_ovf32 = 1'b0;
    end else if (e32) begin
      s32 = {p32[63], p32} + {m_q32[63], m_q32};
      if (s32[64] != s32[63]) begin
        if (!m_ovf32) n_ovf32++;
        m_ovf32 = 1'b1;
      end
      m_q32 = s32[63:0];
    end
    #1;
    checks += 2;
    if (q8 !== m_q8 || ovf8 !== m_ovf8) begin
      failures++;
      if (failures < 20)
        $display("FAIL N=8 a=%0d b=%0d q=%h ovf=%b exp %h %b", x8, y8, q8, ovf8, m_q8, m_ovf8);
    end
    if (q32 !== m_q32 || ovf32 !== m_ovf32) begin
      failures++;
      if (failures < 20)
        $display("FAIL N=32 a=%h b=%h q=%h ovf=%b exp %h %b", x32, y32, q32, ovf32, m_q32, m_ovf32);
    end
  endtask

  initial begin
    static logic [15:0] trace[5] = '{16'd0, 16'd1, 16'd5, 16'd14, 16'd30};
    m_q8 = '0; m_ovf8 = 1'b0; m_q32 = '0; m_ovf32 = 1'b0;

    // Reset, then the published trace on the 8-bit unit (and the same
    // operands on the 32-bit one).
    step(1'b1, 1'b1, 8'd0, 8'd0, 1'b1, 1'b1, 32'd0, 32'd0);
    for (int i = 0; i < 5; i++) begin
      step(1'b0, 1'b1, 8'(i), 8'(i), 1'b0, 1'b1, 32'(i), 32'(i));
      checks += 2;
      if (q8 !== trace[i]) begin
        failures++;
        $display("FAIL N=8 trace step %0d q=%0d exp=%0d", i, q8, trace[i]);
      end
      if (q32 !== 64'(trace[i])) begin
        failures++;
        $display("FAIL N=32 trace step %0d q=%0d exp=%0d", i, q32, trace[i]);
      end
    end

    for (int round = 0; round < 6; round++) begin
      step(1'b1, 1'b0, '0, '0, 1'b1, 1'b0, '0, '0);
      for (int i = 0; i < 300; i++)
        step(1'b0, $urandom_range(0, 3) != 0, 8'($urandom), 8'($urandom),
             1'b0, $urandom_range(0, 3) != 0, $urandom, $urandom);
      for (int i = 0; i < 300; i++)
        step(1'b0, 1'b1, 8'($urandom_range(200, 255)), 8'($urandom_range(200, 255)),
             1'b0, 1'b1, $urandom_range(32'hF000_0000, 32'hFFFF_FFFF),
             $urandom_range(32'hF000_0000, 32'hFFFF_FFFF));
    end

    checks++;
    if (n_ovf8 == 0 || n_ovf32 == 0) begin
      failures++;
      $display("FAIL overflow never set: N=8 %0d, N=32 %0d", n_ovf8, n_ovf32);
    end
    $display("overflow events: N=8 %0d, N=32 %0d", n_ovf8, n_ovf32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
