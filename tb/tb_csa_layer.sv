// tb_csa_layer: checks carry-save layers for partial-product rows 0, 3
// and 7 of an 8x8 multiplier. Random carry-save pairs (s, c) and operands
// are drawn with s + c + row < 2**16 (the only pairs a real product can
// produce); each layer must keep the arithmetic value:
//   s_out + c_out == s_in + c_in + ((x & {8{y_bit}}) << ROW)
// and must never put a carry at position 0.
`timescale 1ps / 1ps
module tb_csa_layer;

  localparam int unsigned N = 8;
  localparam int unsigned W = 2 * N;
  localparam int NUM_VECTORS = 20000;

  logic [N-1:0] x;
  logic         y_bit;
  logic [W-1:0] s_in, c_in;
  logic [W-1:0] s_out [3];
  logic [W-1:0] c_out [3];
  int   checks = 0;
  int   failures = 0;

  csa_layer #(.N(N), .ROW(0)) dut0 (.x(x), .y_bit(y_bit), .s_in(s_in), .c_in(c_in),
                                    .s_out(s_out[0]), .c_out(c_out[0]));
  csa_layer #(.N(N), .ROW(3)) dut3 (.x(x), .y_bit(y_bit), .s_in(s_in), .c_in(c_in),
                                    .s_out(s_out[1]), .c_out(c_out[1]));
  csa_layer #(.N(N), .ROW(7)) dut7 (.x(x), .y_bit(y_bit), .s_in(s_in), .c_in(c_in),
                                    .s_out(s_out[2]), .c_out(c_out[2]));

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int rows[3] = '{0, 3, 7};
    int msb_seen = 0;
    for (int i = 0; i < NUM_VECTORS; i++) begin
      longint unsigned row_val [3];
      longint unsigned total;
      bit ok;
      // Draw until every layer's total stays below 2**16.
      do begin
        x     = N'($urandom);
        y_bit = 1'($urandom);
        s_in  = W'($urandom) >> ($urandom % 4);
        c_in  = W'($urandom) >> ($urandom % 4);
        ok = 1;
        for (int r = 0; r < 3; r++) begin
          row_val[r] = y_bit ? (longint'(x) << rows[r]) : 0;
          if (longint'(s_in) + longint'(c_in) + row_val[r] >= 65536) ok = 0;
        end
      end while (!ok);
      #10;
      for (int r = 0; r < 3; r++) begin
        total = longint'(s_in) + longint'(c_in) + row_val[r];
        checks++;
        if (longint'(s_out[r]) + longint'(c_out[r]) != total || c_out[r][0] !== 1'b0) begin
          failures++;
          if (failures < 10)
            $display("FAIL row %0d x=%0h y=%0b s=%0h c=%0h: got s=%0h c=%0h", rows[r], x, y_bit,
                     s_in, c_in, s_out[r], c_out[r]);
        end
        if (total >= 32768) msb_seen++;
      end
    end
    checks++;
    if (msb_seen == 0) begin
      failures++;
      $display("FAIL no vector reached the MSB position");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
