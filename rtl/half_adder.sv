// half_adder: 1-bit half adder, built as the full adder with its carry-in
// held at logic 0, as the document does to keep a single adder cell.
// sum = a ^ b, cout = a & b. Purely combinational.
`timescale 1ps / 1ps
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  full_adder u_fa (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .sum (sum),
    .cout(cout)
  );

endmodule
