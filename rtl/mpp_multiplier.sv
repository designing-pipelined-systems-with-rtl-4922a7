// mpp_multiplier: N x N-bit carry-save array multiplier organised as a
// mesochronous pipeline.
//
// The array is 2N adder layers deep: N carry-save layers reduce the N
// partial products to a sum vector and a carry vector, and N half-adder
// layers then merge those two vectors one carry position per layer, so no
// layer has a carry rippling along it. The layers are grouped into
// NUM_STAGES wave-pipelined stages of 2N/NUM_STAGES layers each, separated
// by NUM_STAGES+1 register stages (for N = 8: four stages of four layers,
// five register stages). Register stage 1 takes the operands; the
// registers between stages carry the sum and carry vectors, plus the
// operands for as long as a later stage still forms partial products; the
// last register stage holds the 2N-bit product.
//
// Every register stage has its own clock, clk_reg[k] for register stage
// k+1. In the mesochronous scheme these are one clock delayed along the
// pipeline by the delay elements of mpp_top, so that register stage k+1
// catches, on its n-th rising edge, the wave launched by register stage k
// on its n-th edge. The product of operands sampled on edge n of clk_reg[0]
// therefore appears at m after edge n of clk_reg[NUM_STAGES]; one product
// is accepted per clock period. If all clk_reg bits are driven by the same
// clock the circuit is an ordinary pipeline with a latency of NUM_STAGES
// cycles. The grouping of four layers per stage is this design's reading
// of the register placement; the array, layer counts and stage counts
// follow the document.
`timescale 1ps / 1ps
module mpp_multiplier #(
  parameter int unsigned N          = mpp_pkg::OPERAND_WIDTH,
  parameter int unsigned NUM_STAGES = mpp_pkg::NUM_STAGES
) (
  input  logic [NUM_STAGES:0] clk_reg,
  input  logic [N-1:0]        x,
  input  logic [N-1:0]        y,
  output logic [2*N-1:0]      m
);

  localparam int unsigned W   = 2 * N;
  localparam int unsigned LPS = (2 * N) / NUM_STAGES;  // layers per stage

  // Inputs of stage k (after register stage k+1) and outputs of stage k
  logic [N-1:0] x_q [NUM_STAGES];
  logic [N-1:0] y_q [NUM_STAGES];
  logic [W-1:0] s_q [NUM_STAGES];
  logic [W-1:0] c_q [NUM_STAGES];
  logic [N-1:0] x_d [NUM_STAGES];
  logic [N-1:0] y_d [NUM_STAGES];
  logic [W-1:0] s_d [NUM_STAGES];
  logic [W-1:0] c_d [NUM_STAGES];

  // Register stage 1: the operands
  mpp_register #(.WIDTH(2 * N)) u_reg_in (
    .clk(clk_reg[0]),
    .d  ({x, y}),
    .q  ({x_q[0], y_q[0]})
  );
  assign s_q[0] = '0;
  assign c_q[0] = '0;

  for (genvar k = 0; k < NUM_STAGES; k++) begin : g_stage
    mpp_wave_stage #(
      .N          (N),
      .FIRST_LAYER(k * LPS),
      .NUM_LAYERS (LPS)
    ) u_stage (
      .x_in (x_q[k]),
      .y_in (y_q[k]),
      .s_in (s_q[k]),
      .c_in (c_q[k]),
      .x_out(x_d[k]),
      .y_out(y_d[k]),
      .s_out(s_d[k]),
      .c_out(c_d[k])
    );
  end

  // Register stages 2 .. NUM_STAGES between the wave-pipelined stages
  for (genvar k = 1; k < NUM_STAGES; k++) begin : g_reg
    if (k * LPS < N) begin : g_with_operands
      // A later stage still forms partial products: keep the operands.
      mpp_register #(.WIDTH(2 * N + 2 * W)) u_reg (
        .clk(clk_reg[k]),
        .d  ({x_d[k-1], y_d[k-1], s_d[k-1], c_d[k-1]}),
        .q  ({x_q[k], y_q[k], s_q[k], c_q[k]})
      );
    end else begin : g_sum_carry
      mpp_register #(.WIDTH(2 * W)) u_reg (
        .clk(clk_reg[k]),
        .d  ({s_d[k-1], c_d[k-1]}),
        .q  ({s_q[k], c_q[k]})
      );
      assign x_q[k] = '0;
      assign y_q[k] = '0;
    end
  end

  // Last register stage: the product. After all 2N layers the carry
  // vector c_d[NUM_STAGES-1] is zero, so the sum vector is the product.
  mpp_register #(.WIDTH(W)) u_reg_out (
    .clk(clk_reg[NUM_STAGES]),
    .d  (s_d[NUM_STAGES-1]),
    .q  (m)
  );

endmodule
