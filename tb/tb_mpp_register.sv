// tb_mpp_register: random data through a 16-bit register stage. After
// every rising clock edge q must equal the d present at that edge, and q
// must hold when d changes and the clock falls.
`timescale 1ps / 1ps
module tb_mpp_register;

  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0;
  logic [WIDTH-1:0] d, q, sampled;
  int   checks = 0;
  int   failures = 0;

  mpp_register #(.WIDTH(WIDTH)) dut (.clk(clk), .d(d), .q(q));

  always #175 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      #50;
      d = WIDTH'($urandom);
      sampled = d;
      @(posedge clk);
      #1;
      checks++;
      if (q !== sampled) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q=%0h expected %0h", i, q, sampled);
      end
      // Change d between edges: q must hold through the falling edge.
      #50;
      d = ~sampled;
      @(negedge clk);
      #1;
      checks++;
      if (q !== sampled) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q changed without a rising edge", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
