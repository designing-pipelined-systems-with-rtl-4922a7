// tb_mpp_multiplier: the 8x8 multiplier core under its two clockings.
//
// dut_sync has all five register stages on one clock: it must behave as a
// conventional pipeline, the product of operands sampled on edge i
// appearing after edge i+4. dut_meso gets the clock delayed by 40 ps more
// at each register stage, as the clock delay line of the mesochronous
// scheme does: register stage k+1 then catches the wave register stage k
// launched on the same edge, and the product of operands sampled on edge i
// of the first clock appears after edge i of the last one. All 65,536
// operand pairs are applied, one per 350 ps clock period.
`timescale 1ps / 1ps
module tb_mpp_multiplier;

  localparam int unsigned N = 8;
  localparam int unsigned TCLK = 350;
  localparam int unsigned SKEW = 40;
  localparam int unsigned LATENCY_SYNC = 4;

  logic           clk = 1'b0;
  logic [4:0]     clk_meso;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] m_sync, m_meso;
  logic [2*N-1:0] expected [$];
  int   checks = 0;
  int   failures = 0;

  assign clk_meso[0] = clk;
  for (genvar k = 1; k < 5; k++) begin : g_skew
    assign #(SKEW) clk_meso[k] = clk_meso[k-1];
  end

  mpp_multiplier #(.N(N), .NUM_STAGES(4)) dut_sync (
    .clk_reg({5{clk}}), .x(x), .y(y), .m(m_sync)
  );
  mpp_multiplier #(.N(N), .NUM_STAGES(4)) dut_meso (
    .clk_reg(clk_meso), .x(x), .y(y), .m(m_meso)
  );

  always #(TCLK / 2) clk = ~clk;

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int total = 65536 + LATENCY_SYNC;
    for (int i = 0; i < total; i++) begin
      @(negedge clk);
      {x, y} = 16'(i);
      expected.push_back(16'(int'(x) * int'(y)));
      @(posedge clk);
      // Mesochronous clocking: result of the same edge at the last stage.
      #(4 * SKEW + 1);
      if (i < 65536) begin
        checks++;
        if (m_meso !== expected[i]) begin
          failures++;
          if (failures < 10) $display("FAIL meso edge %0d: m=%0h expected %0h", i, m_meso, expected[i]);
        end
      end
      // One clock: result four edges later.
      if (i >= int'(LATENCY_SYNC)) begin
        checks++;
        if (m_sync !== expected[i - LATENCY_SYNC]) begin
          failures++;
          if (failures < 10)
            $display("FAIL sync edge %0d: m=%0h expected %0h", i, m_sync, expected[i - LATENCY_SYNC]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
