// mpp_wave_stage: one wave-pipelined logic stage of the multiplier.
//
// The stage is the logic enclosed between two register stages: NUM_LAYERS
// consecutive adder layers of the 2N-layer array, starting at layer
// FIRST_LAYER. Layers 0 .. N-1 are carry-save layers (layer l adds partial
// product l, formed here from the operands), layers N .. 2N-1 are
// half-adder merge layers. The operands x and y pass through unchanged so
// that later stages can form their own partial products (the buffer chain
// along the bottom of the array).
//
// The stage is purely combinational and holds no state. In the mesochronous
// scheme several data waves travel through it at once, separated only by
// the spread between its shortest and longest path; the register that
// follows it is clocked late enough to catch each wave. The split of the
// array into stages is a parameter of the instantiating module.
`timescale 1ps / 1ps
module mpp_wave_stage #(
  parameter int unsigned N           = 8,
  parameter int unsigned FIRST_LAYER = 0,
  parameter int unsigned NUM_LAYERS  = 4
) (
  input  logic [N-1:0]   x_in,
  input  logic [N-1:0]   y_in,
  input  logic [2*N-1:0] s_in,
  input  logic [2*N-1:0] c_in,
  output logic [N-1:0]   x_out,
  output logic [N-1:0]   y_out,
  output logic [2*N-1:0] s_out,
  output logic [2*N-1:0] c_out
);

  localparam int unsigned W = 2 * N;

  logic [W-1:0] s_chain [NUM_LAYERS+1];
  logic [W-1:0] c_chain [NUM_LAYERS+1];

  assign s_chain[0] = s_in;
  assign c_chain[0] = c_in;

  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_layer
    localparam int unsigned LAYER = FIRST_LAYER + l;
    if (LAYER < N) begin : g_csa
      csa_layer #(.N(N), .ROW(LAYER)) u_csa (
        .x    (x_in),
        .y_bit(y_in[LAYER]),
        .s_in (s_chain[l]),
        .c_in (c_chain[l]),
        .s_out(s_chain[l+1]),
        .c_out(c_chain[l+1])
      );
    end else begin : g_ha
      ha_merge_layer #(.N(N)) u_ha (
        .s_in (s_chain[l]),
        .c_in (c_chain[l]),
        .s_out(s_chain[l+1]),
        .c_out(c_chain[l+1])
      );
    end
  end

  assign s_out = s_chain[NUM_LAYERS];
  assign c_out = c_chain[NUM_LAYERS];
  assign x_out = x_in;
  assign y_out = y_in;

endmodule
