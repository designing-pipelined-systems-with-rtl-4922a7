// full_adder: 1-bit full adder in the pass-gate multiplexer form.
//
// The two operands a and b first form the propagate signal p = a ^ b. That
// signal then steers two multiplexers: sum takes the inverted carry-in when
// p is 1 and the carry-in when p is 0; cout takes the carry-in when p is 1
// and b when p is 0 (with p = 0, a and b are equal, so either serves as the
// carry). This is the structure of the document's transistor-level cell,
// written at gate level. The cell there is differential (every signal has a
// complement) and delays cin and b with inverter pairs so that they arrive
// together with p; both are electrical details with no logic function and
// are left out here. Purely combinational.
`timescale 1ps / 1ps
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ? ~cin : cin;
    cout = p ? cin : b;
  end

endmodule
