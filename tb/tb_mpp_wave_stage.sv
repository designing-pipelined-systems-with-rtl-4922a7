// tb_mpp_wave_stage: the four wave-pipelined stages of the 8x8 multiplier
// (layers 0-3, 4-7, 8-11, 12-15) are chained without registers and driven
// with all 65,536 operand pairs. Checked after each stage:
//   stage 1: s + c == x * (y & 4'hF)   (partial products 0..3 added)
//   stage 2: s + c == x * y            (all partial products added)
//   stage 3: s + c == x * y
//   stage 4: s == x * y and c == 0      (every carry merged)
// and that the operands reach the outputs of each stage unchanged.
`timescale 1ps / 1ps
module tb_mpp_wave_stage;

  localparam int unsigned N = 8;
  localparam int unsigned W = 2 * N;

  logic [N-1:0] x, y;
  logic [N-1:0] xs [5];
  logic [N-1:0] ys [5];
  logic [W-1:0] ss [5];
  logic [W-1:0] cs [5];
  int   checks = 0;
  int   failures = 0;

  assign xs[0] = x;
  assign ys[0] = y;
  assign ss[0] = '0;
  assign cs[0] = '0;

  for (genvar k = 0; k < 4; k++) begin : g_dut
    mpp_wave_stage #(.N(N), .FIRST_LAYER(4 * k), .NUM_LAYERS(4)) dut (
      .x_in (xs[k]),   .y_in (ys[k]),   .s_in (ss[k]),   .c_in (cs[k]),
      .x_out(xs[k+1]), .y_out(ys[k+1]), .s_out(ss[k+1]), .c_out(cs[k+1])
    );
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s for x=%0d y=%0d: s=%0h c=%0h", what, x, y, ss[4], cs[4]);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int unsigned p;
      {x, y} = 16'(i);
      #10;
      p = int'(x) * int'(y);
      expect_true(int'(ss[1]) + int'(cs[1]) == int'(x) * int'(y & 8'h0F), "stage 1 value");
      expect_true(int'(ss[2]) + int'(cs[2]) == p, "stage 2 value");
      expect_true(int'(ss[3]) + int'(cs[3]) == p, "stage 3 value");
      expect_true(int'(ss[4]) == p && cs[4] == '0, "stage 4 product");
      expect_true(xs[4] == x && ys[4] == y, "operand pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
