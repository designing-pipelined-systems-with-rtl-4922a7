// mpp_top: the mesochronous pipelined multiplier with its clock path.
//
// One clock, clk_in, enters at the first register stage. Between register
// stage k and k+1 it passes a delay element (mpp_clock_delay) that stands
// for the delay of the logic stage between them, so the clock travels
// along with the data and leaves, delayed by NUM_STAGES elements, as
// clk_out alongside the product m. There is no clock tree.
//
// Operands x, y sampled on the n-th rising edge of clk_in give the product
// m = x * y, valid after the n-th rising edge of clk_out. One product is
// accepted every clock period.
//
// In silicon each delay matches the data delay of its stage, which may be
// several clock periods long (several waves in flight in one stage). The
// RTL logic has no delay, so in a zero-delay simulation CLK_DELAY_PS must
// lie between 0 and one clock period for register stage k+1 to catch the
// wave of the same edge; the default of 100 ps is this design's choice for
// that purpose, the document gives no delay values.
`timescale 1ps / 1ps
module mpp_top #(
  parameter int unsigned N            = mpp_pkg::OPERAND_WIDTH,
  parameter int unsigned NUM_STAGES   = mpp_pkg::NUM_STAGES,
  parameter int unsigned CLK_DELAY_PS = 100
) (
  input  logic           clk_in,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] m,
  output logic           clk_out
);

  logic [NUM_STAGES:0] clk_reg;

  assign clk_reg[0] = clk_in;

  for (genvar k = 0; k < NUM_STAGES; k++) begin : g_clk_delay
    mpp_clock_delay #(.DELAY_PS(CLK_DELAY_PS)) u_delay (
      .clk_in (clk_reg[k]),
      .clk_out(clk_reg[k+1])
    );
  end

  mpp_multiplier #(.N(N), .NUM_STAGES(NUM_STAGES)) u_mult (
    .clk_reg(clk_reg),
    .x      (x),
    .y      (y),
    .m      (m)
  );

  assign clk_out = clk_reg[NUM_STAGES];

endmodule
