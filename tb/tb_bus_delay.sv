// tb_bus_delay: behavioural model of the propagation delay of one
// wave-pipelined logic stage, for timed simulation only.
//
// The RTL logic stages have no delay. This model delays each bit of a bus
// by its own amount, spread evenly from DMIN_PS (bit 0) to DMAX_PS (the top
// bit), so a data wave arrives at the next register smeared over
// DMAX_PS - DMIN_PS, as in the real array where every path has its own
// delay. Each bit is a chain of buffers of at most BUFFER_DELAY_PS (which
// must stay below the shortest pulse on the bus), so several waves can be
// on their way through one bit at once.
`timescale 1ps / 1ps
module tb_bus_delay #(
  parameter int unsigned WIDTH           = 8,
  parameter int unsigned DMIN_PS         = 1000,
  parameter int unsigned DMAX_PS         = 1100,
  parameter int unsigned BUFFER_DELAY_PS = 100
) (
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  for (genvar b = 0; b < WIDTH; b++) begin : g_bit
    localparam int unsigned DELAY =
      (WIDTH == 1) ? DMAX_PS : DMIN_PS + ((DMAX_PS - DMIN_PS) * b) / (WIDTH - 1);
    localparam int unsigned NUM_BUF = (DELAY + BUFFER_DELAY_PS - 1) / BUFFER_DELAY_PS;
    logic [NUM_BUF:0] node;
    assign node[0] = d[b];
    for (genvar i = 0; i < NUM_BUF; i++) begin : g_buf
      localparam int unsigned D =
        (i == NUM_BUF - 1) ? DELAY - (NUM_BUF - 1) * BUFFER_DELAY_PS : BUFFER_DELAY_PS;
      assign #(D) node[i+1] = node[i];
    end
    assign q[b] = node[NUM_BUF];
  end

endmodule
