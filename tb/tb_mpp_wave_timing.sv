// tb_mpp_wave_timing: timed simulation of the mesochronous multiplier at
// the 350 ps clock period, with the flip-flop setup (10 ps), hold (130 ps)
// and clock-to-output (295 ps) times of the document.
//
// Two timed pipelines (tb_timed_pipeline) run the same 600 random
// operand pairs:
//   good: stage path delays 1195..1375 ps (clock-to-output plus a logic
//         spread of 180 ps, inside the 190 ps limit), clock delay 1400 ps
//         per stage. Products must be right, no setup or hold violation may
//         occur, and the first stage must hold four data waves at once.
//   bad:  logic spread of 300 ps (1115..1415 ps), clock delay 1430 ps. The
//         spread is beyond the limit, so the hold monitors must fire
//         (the zero-hold RTL registers still compute, so only the
//         monitors tell; its products are not checked).
// The test also checks the document's two clock-period results from the
// mpp_pkg formulas: a 190 ps delay-difference budget at 350 ps, and a
// 595 ps conventional clock period for one adder layer per stage.
`timescale 1ps / 1ps
module tb_mpp_wave_timing;

  localparam int unsigned TCLK = mpp_pkg::TCLK_PS;
  localparam longint START = 20000;
  localparam int NUM_PAIRS = 600;

  logic        clk = 1'b0;
  logic [7:0]  x, y;
  logic [15:0] m_good, m_bad;
  logic [4:0]  clk_good, clk_bad;
  int          setup_good, hold_good, setup_bad, hold_bad;
  logic [15:0] expected [$];
  int   checks = 0;
  int   failures = 0;
  int   launched = 0;
  int   captured = 0;
  int   max_waves = 0;
  int   n_out = 0;

  tb_timed_pipeline #(.DMIN_PS(1195), .DMAX_PS(1375), .CLK_DELAY_PS(1400), .START_PS(START)) good (
    .clk_in(clk), .x(x), .y(y), .m(m_good), .clk_reg(clk_good),
    .setup_violations(setup_good), .hold_violations(hold_good)
  );
  tb_timed_pipeline #(.DMIN_PS(1115), .DMAX_PS(1415), .CLK_DELAY_PS(1430), .START_PS(START)) bad (
    .clk_in(clk), .x(x), .y(y), .m(m_bad), .clk_reg(clk_bad),
    .setup_violations(setup_bad), .hold_violations(hold_bad)
  );

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #(START + longint'(NUM_PAIRS + 200) * TCLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clock starts once the delay chains have settled.
  initial begin
    #(START);
    forever #(TCLK / 2) clk = ~clk;
  end

  // Waves in flight in the first stage: launched by register stage 1,
  // not yet captured by register stage 2.
  always @(posedge clk_good[0]) launched++;
  always @(posedge clk_good[1]) if ($time > START) captured++;
  always @(negedge clk_good[0]) if (launched - captured > max_waves) max_waves = launched - captured;

  initial begin
    x = '0;
    y = '0;
    @(posedge clk);
    for (int i = 0; i < NUM_PAIRS; i++) begin
      @(negedge clk);
      x = 8'($urandom);
      y = 8'($urandom);
      if (i % 50 == 0) begin x = 8'hFF; y = 8'hFF; end
      expected.push_back(16'(int'(x) * int'(y)));
    end
  end

  // Product of the i-th pair (sampled on clk edge i+2) leaves register
  // stage 5 on edge i+2 of its clock.
  int out_edge = 0;
  always @(posedge clk_good[4]) if ($time > START) begin
    out_edge++;
    #1;
    if (out_edge >= 2 && n_out < NUM_PAIRS) begin
      checks++;
      if (m_good !== expected[n_out]) begin
        failures++;
        if (failures < 10)
          $display("FAIL product %0d: m=%0h expected %0h", n_out, m_good, expected[n_out]);
      end
      n_out++;
      if (n_out == NUM_PAIRS) begin
        expect_true(setup_good == 0, "setup violations at 180 ps spread");
        expect_true(hold_good == 0, "hold violations at 180 ps spread");
        expect_true(hold_bad + setup_bad > 0, "no violation at 300 ps spread");
        expect_true(max_waves >= 4, "fewer than four waves in stage 1");
        expect_true(mpp_pkg::max_delay_difference_ps(350) == 190, "delay-difference budget");
        expect_true(mpp_pkg::conventional_tclk_ps(mpp_pkg::FA_DMAX_PS) == 595, "conventional period");
        $display("waves_in_stage1=%0d good: setup=%0d hold=%0d  bad: setup=%0d hold=%0d",
                 max_waves, setup_good, hold_good, setup_bad, hold_bad);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

endmodule
