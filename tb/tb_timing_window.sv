// tb_timing_window: setup/hold monitor for one register stage, for timed
// simulation only. It watches the data bus d arriving at a register and
// the register's clock. A bit that changes less than TSETUP_PS before a
// rising clock edge is a setup violation; a bit that changes less than
// THOLD_PS after one is a hold violation. The counts are outputs so that
// a testbench can check them.
`timescale 1ps / 1ps
module tb_timing_window #(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned TSETUP_PS = 10,
  parameter int unsigned THOLD_PS  = 130,
  parameter longint      START_PS  = 0
) (
  input  logic [WIDTH-1:0] d,
  input  logic             clk,
  output int               setup_violations,
  output int               hold_violations,
  output int               edges
);

  longint         last_change [WIDTH];
  longint         last_edge = -1000000;
  logic [WIDTH-1:0] d_prev;

  initial begin
    setup_violations = 0;
    hold_violations  = 0;
    edges            = 0;
    for (int b = 0; b < WIDTH; b++) last_change[b] = -1000000;
    d_prev = d;
  end

  always @(d) begin
    for (int b = 0; b < WIDTH; b++) begin
      if (d[b] != d_prev[b]) begin
        last_change[b] = $time;
        if ($time > START_PS && $time - last_edge < longint'(THOLD_PS)) hold_violations++;
      end
    end
    d_prev = d;
  end

  always @(posedge clk) begin
    last_edge = $time;
    if ($time > START_PS) begin
      edges++;
      for (int b = 0; b < WIDTH; b++) begin
        if ($time - last_change[b] < longint'(TSETUP_PS)) setup_violations++;
      end
    end
  end

endmodule
