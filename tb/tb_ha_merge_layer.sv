// tb_ha_merge_layer: checks one half-adder merge layer of a 16-bit
// product. For random pairs with s + c < 2**16 the layer must keep the
// arithmetic value (s_out + c_out == s_in + c_in), put the half-adder sum
// s ^ c at every position and move each carry s & c one position up.
// A pair with no pending carry must pass unchanged.
`timescale 1ps / 1ps
module tb_ha_merge_layer;

  localparam int unsigned N = 8;
  localparam int unsigned W = 2 * N;

  logic [W-1:0] s_in, c_in, s_out, c_out;
  int   checks = 0;
  int   failures = 0;

  ha_merge_layer #(.N(N)) dut (.s_in(s_in), .c_in(c_in), .s_out(s_out), .c_out(c_out));

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      do begin
        s_in = W'($urandom) >> ($urandom % 3);
        c_in = W'($urandom) >> ($urandom % 3);
        if (i % 7 == 0) c_in = '0;
      end while (int'(s_in) + int'(c_in) >= 65536);
      #10;
      checks++;
      if (int'(s_out) + int'(c_out) != int'(s_in) + int'(c_in)
          || s_out != (s_in ^ c_in)
          || c_out != W'((s_in & c_in) << 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL s=%0h c=%0h: got s=%0h c=%0h", s_in, c_in, s_out, c_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
