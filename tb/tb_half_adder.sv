// tb_half_adder: exhaustive check of the half adder (full adder with
// carry-in 0) against a + b.
`timescale 1ps / 1ps
module tb_half_adder;

  logic a, b, sum, cout;
  int   checks = 0;
  int   failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        #10;
        checks++;
        if ({cout, sum} !== 2'(a) + 2'(b)) begin
          failures++;
          $display("FAIL a=%0d b=%0d: got cout=%0d sum=%0d", a, b, cout, sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
