// mpp_register: one pipeline register stage.
//
// WIDTH positive-edge-triggered D flip-flops sharing one clock. All bits
// are sampled on the rising edge of clk and presented to the next stage
// together, which removes the arrival-time spread the previous
// wave-pipelined stage added. The document builds this from differential
// sense-amplifier flip-flops (setup about 10 ps, hold about 130 ps,
// clock-to-output about 295 ps, clock high time at least 160 ps); those are
// circuit properties and appear here only as constants in mpp_pkg. Like
// the document's flip-flop, the register has no reset: the multiplier is a
// pure datapath and every result is overwritten by the next wave.
`timescale 1ps / 1ps
module mpp_register #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
