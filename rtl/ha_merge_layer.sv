// ha_merge_layer: one half-adder layer of the final merge.
//
// After the carry-save layers the product is held as a sum vector and a
// carry vector. Instead of a carry-propagate adder, the multiplier merges
// them with layers of half adders: at each position j a half adder takes
// s_in[j] and c_in[j] and produces the new sum bit at j and a carry at j+1.
// Each layer therefore moves every pending carry one place up, and after N
// layers no carry is left for an N x N product. The delay of one layer is
// one adder cell, which keeps the last stage from becoming the slow one.
//
// At the MSB the carry out is always 0 (the product fits in 2N bits), so the
// half adder there is an OR gate. Invariant: s_out + c_out == s_in + c_in
// whenever s_in + c_in < 2**(2N). Combinational.
`timescale 1ps / 1ps
module ha_merge_layer #(
  parameter int unsigned N = 8
) (
  input  logic [2*N-1:0] s_in,
  input  logic [2*N-1:0] c_in,
  output logic [2*N-1:0] s_out,
  output logic [2*N-1:0] c_out
);

  localparam int unsigned W = 2 * N;

  logic [W-2:0] carry;

  for (genvar j = 0; j < W - 1; j++) begin : g_ha
    half_adder u_ha (
      .a   (s_in[j]),
      .b   (c_in[j]),
      .sum (s_out[j]),
      .cout(carry[j])
    );
  end

  assign s_out[W-1] = s_in[W-1] | c_in[W-1];
  assign c_out      = {carry, 1'b0};

endmodule
