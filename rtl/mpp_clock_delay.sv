// mpp_clock_delay: behavioural model of a clock-path delay element.
//
// This is a behavioural model, not synthesizable logic. In the mesochronous
// pipeline the clock is not distributed as a tree: it enters at the first
// register stage and travels alongside the data, and between two register
// stages it passes a delay element that emulates the delay the data
// suffers in the logic stage between them. In silicon the element is a
// chain of buffers sized for that delay, and it is modelled the same way:
// a chain of buffers of BUFFER_DELAY_PS each (the last one takes the
// remainder) adding up to DELAY_PS picoseconds. Each buffer delay must stay
// below the clock's high and low times so that no pulse is swallowed; the
// whole chain may be longer than a clock period, with several clock edges
// on their way at once. Both delay values are this design's choice: the
// document gives none.
`timescale 1ps / 1ps
module mpp_clock_delay #(
  parameter int unsigned DELAY_PS        = 100,
  parameter int unsigned BUFFER_DELAY_PS = 25
) (
  input  logic clk_in,
  output logic clk_out
);

  localparam int unsigned NUM_BUF = (DELAY_PS + BUFFER_DELAY_PS - 1) / BUFFER_DELAY_PS;

  if (NUM_BUF == 0) begin : g_none
    assign clk_out = clk_in;
  end else begin : g_chain
    logic [NUM_BUF:0] node;
    assign node[0] = clk_in;
    for (genvar i = 0; i < NUM_BUF; i++) begin : g_buf
      localparam int unsigned D =
        (i == NUM_BUF - 1) ? DELAY_PS - (NUM_BUF - 1) * BUFFER_DELAY_PS : BUFFER_DELAY_PS;
      assign #(D) node[i+1] = node[i];
    end
    assign clk_out = node[NUM_BUF];
  end

endmodule
