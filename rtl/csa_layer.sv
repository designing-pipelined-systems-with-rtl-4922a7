// csa_layer: one carry-save layer of the array multiplier.
//
// A row of AND gates forms partial product ROW, x & y_bit, shifted left by
// ROW places. A row of full adders adds that row to the incoming carry-save
// pair (s_in, c_in): at every bit position j the adder takes s_in[j], the
// partial-product bit and c_in[j], returns the sum bit at position j and
// the carry at position j+1. No carry moves sideways inside the layer, so
// the layer's delay is one full adder whatever the width.
//
// At the top position (2N-1) the true product never produces a carry, so at
// most one of the three inputs there can be 1 and the adder reduces to an OR
// gate; this is how the OR gates at the product's MSB are read here. Bits
// whose inputs are constant 0 in a given layer fold away in synthesis.
// Invariant: s_out + c_out == s_in + c_in + ((x & {N{y_bit}}) << ROW) for
// every input pair that comes from a real multiplication. Combinational.
`timescale 1ps / 1ps
module csa_layer #(
  parameter int unsigned N   = 8,
  parameter int unsigned ROW = 0
) (
  input  logic [N-1:0]   x,
  input  logic           y_bit,
  input  logic [2*N-1:0] s_in,
  input  logic [2*N-1:0] c_in,
  output logic [2*N-1:0] s_out,
  output logic [2*N-1:0] c_out
);

  localparam int unsigned W = 2 * N;

  logic [W-1:0] pp;      // partial-product row at its weight
  logic [W-2:0] carry;   // carry out of positions 0 .. W-2

  always_comb begin
    pp = '0;
    for (int unsigned j = 0; j < N; j++) begin
      pp[j + ROW] = x[j] & y_bit;
    end
  end

  for (genvar j = 0; j < W - 1; j++) begin : g_fa
    full_adder u_fa (
      .a   (s_in[j]),
      .b   (pp[j]),
      .cin (c_in[j]),
      .sum (s_out[j]),
      .cout(carry[j])
    );
  end

  // MSB: the carry out of the product's top bit is always 0.
  assign s_out[W-1] = s_in[W-1] | pp[W-1] | c_in[W-1];

  assign c_out = {carry, 1'b0};

endmodule
