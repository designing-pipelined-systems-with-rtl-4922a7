// tb_mpp_clock_delay: a 350 ps clock drives two delay elements, one of
// 100 ps (shorter than the period) and one of 1000 ps (almost three
// periods, as in a stage that holds several data waves). Every rising and
// falling edge at each output (after the chains have settled from
// their random start) must come exactly DELAY_PS after the
// matching input edge, and every input edge must reappear.
`timescale 1ps / 1ps
module tb_mpp_clock_delay;

  localparam int unsigned TCLK = 350;

  logic clk = 1'b0;
  logic clk_d100, clk_d1000;
  int   checks = 0;
  int   failures = 0;
  longint in_rise [$];
  longint in_fall [$];
  longint in_rise2 [$];
  longint in_fall2 [$];
  bit     running = 1'b1;

  mpp_clock_delay #(.DELAY_PS(100))  dut_short (.clk_in(clk), .clk_out(clk_d100));
  mpp_clock_delay #(.DELAY_PS(1000)) dut_long  (.clk_in(clk), .clk_out(clk_d1000));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (running) begin in_rise.push_back($time); in_rise2.push_back($time); end
  always @(negedge clk) if (running) begin in_fall.push_back($time); in_fall2.push_back($time); end

  task automatic check_edge(ref longint q [$], input longint delay, input string what);
    longint t0;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL %s: output edge without input edge at %0t", what, $time);
    end else begin
      t0 = q.pop_front();
      if ($time - t0 != delay) begin
        failures++;
        $display("FAIL %s: edge at %0t, input edge at %0d", what, $time, t0);
      end
    end
  endtask

  // The buffer chain starts at random levels; edges before the clock
  // starts are the chain settling and are not checked.
  localparam longint SETTLE = 2000;

  always @(posedge clk_d100)  if ($time > SETTLE) check_edge(in_rise,  100,  "rise 100");
  always @(negedge clk_d100)  if ($time > SETTLE) check_edge(in_fall,  100,  "fall 100");
  always @(posedge clk_d1000) if ($time > SETTLE) check_edge(in_rise2, 1000, "rise 1000");
  always @(negedge clk_d1000) if ($time > SETTLE) check_edge(in_fall2, 1000, "fall 1000");

  initial begin
    #(SETTLE);
    repeat (400) begin
      #(TCLK / 2) clk = 1'b1;
      #(TCLK / 2) clk = 1'b0;
    end
    #1 running = 1'b0;
    #2000;
    checks++;
    if (in_rise.size() != 0 || in_fall.size() != 0 || in_rise2.size() != 0 || in_fall2.size() != 0) begin
      failures++;
      $display("FAIL input edges never reached the output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
