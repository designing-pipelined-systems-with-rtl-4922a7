// tb_full_adder: exhaustive check of the 1-bit full adder.
// All eight input combinations are applied; sum and carry are compared
// with the arithmetic value a + b + cin. Then every one of the 56 ordered
// transitions between two different input combinations is applied and the
// outputs are checked after each.
`timescale 1ps / 1ps
module tb_full_adder;

  logic a, b, cin, sum, cout;
  int   checks = 0;
  int   failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply_and_check(input logic [2:0] v);
    logic [1:0] expected;
    {a, b, cin} = v;
    #10;
    expected = 2'(a) + 2'(b) + 2'(cin);
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL a=%0d b=%0d cin=%0d: got cout=%0d sum=%0d", a, b, cin, cout, sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int transitions = 0;
    for (int v = 0; v < 8; v++) apply_and_check(3'(v));
    for (int u = 0; u < 8; u++) begin
      for (int v = 0; v < 8; v++) begin
        if (u != v) begin
          apply_and_check(3'(u));
          apply_and_check(3'(v));
          transitions++;
        end
      end
    end
    checks++;
    if (transitions != 56) begin
      failures++;
      $display("FAIL expected 56 transitions, applied %0d", transitions);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
