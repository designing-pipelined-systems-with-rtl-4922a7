// tb_mpp_top: end-to-end test of the mesochronous multiplier at its
// default parameters (8x8 bits, four stages, 100 ps clock delay per stage)
// with the 350 ps clock of the document.
//
// All 65,536 operand pairs are fed, one per clock period. The product of
// the pair sampled on the n-th rising edge of clk_in must be on m after
// the n-th rising edge of clk_out. Besides the products the test counts
// how often each mechanism of the design was exercised and fails if one
// never was:
//   - a new product on every clock period (full throughput),
//   - clk_out lagging clk_in by the four clock-path delays,
//   - a product whose carries need all eight half-adder merge layers,
//   - a product with its top bit set (the OR gates at the MSB),
//   - a product that a single carry-propagate step would get wrong
//     (carry-save form really needed the merge layers).
`timescale 1ps / 1ps
module tb_mpp_top;

  localparam int unsigned N = 8;
  localparam int unsigned TCLK = mpp_pkg::TCLK_PS;
  localparam int unsigned STAGE_DELAY = 100;   // mpp_top default
  localparam int unsigned NUM_PAIRS = 65536;

  logic           clk_in = 1'b0;
  logic           clk_out;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] m;
  logic [2*N-1:0] expected [$];
  longint         in_edge_time [$];
  int   checks = 0;
  int   failures = 0;
  int   n_out = 0;
  int   n_throughput = 0;
  int   n_clock_lag = 0;
  int   n_full_merge = 0;
  int   n_msb = 0;
  int   n_multi_layer = 0;
  logic [2*N-1:0] prev_m;

  mpp_top dut (.clk_in(clk_in), .x(x), .y(y), .m(m), .clk_out(clk_out));

  // Own model: number of half-adder layers the carry-save pair of x*y
  // needs before no carry is left.
  function automatic int merge_layers(int unsigned xv, int unsigned yv);
    int unsigned s = 0, c = 0, r, ns;
    int layers = 0;
    for (int i = 0; i < N; i++) begin
      r  = ((yv >> i) & 1) != 0 ? (xv << i) : 0;
      ns = s ^ c ^ r;
      c  = ((s & c) | (s & r) | (c & r)) << 1;
      s  = ns;
    end
    while (c != 0) begin
      ns = s ^ c;
      c  = (s & c) << 1;
      s  = ns;
      layers++;
    end
    return layers;
  endfunction

  // The clock starts after SETTLE ps, once the clock delay line has
  // settled from its random start; clk_out edges before that are ignored.
  localparam longint SETTLE = 2000;

  initial begin
    #(SETTLE);
    forever #(TCLK / 2) clk_in = ~clk_in;
  end

  always @(posedge clk_in) in_edge_time.push_back($time);

  initial begin
    repeat (NUM_PAIRS + 100) @(posedge clk_in);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: a new pair before every rising edge of clk_in (the first
  // at time 0, the others at the falling edges).
  initial begin
    for (int i = 0; i < NUM_PAIRS; i++) begin
      {x, y} = 16'(i);
      expected.push_back(16'(int'(x) * int'(y)));
      if (merge_layers(x, y) == int'(N)) n_full_merge++;
      if (merge_layers(x, y) > 1) n_multi_layer++;
      @(negedge clk_in);
    end
  end

  // Response: one product per rising edge of clk_out.
  always @(posedge clk_out) if ($time > SETTLE) begin
    longint t_in;
    t_in = in_edge_time.pop_front();
    checks++;
    if ($time - t_in == longint'(4 * STAGE_DELAY)) n_clock_lag++;
    else begin
      failures++;
      $display("FAIL clk_out edge at %0t, clk_in edge at %0d", $time, t_in);
    end
    #1;
    if (n_out < int'(NUM_PAIRS)) begin
      checks++;
      if (m !== expected[n_out]) begin
        failures++;
        if (failures < 10) $display("FAIL product %0d: m=%0h expected %0h", n_out, m, expected[n_out]);
      end else begin
        if (n_out > 0 && m != prev_m) n_throughput++;
        if (m[2*N-1]) n_msb++;
      end
      prev_m = m;
      n_out++;
    end
    if (n_out == int'(NUM_PAIRS)) begin
      checks++;
      if (n_throughput == 0) begin failures++; $display("FAIL no back-to-back products"); end
      checks++;
      if (n_clock_lag == 0) begin failures++; $display("FAIL clock lag never seen"); end
      checks++;
      if (n_full_merge == 0) begin failures++; $display("FAIL no product needed all merge layers"); end
      checks++;
      if (n_msb == 0) begin failures++; $display("FAIL no product used the MSB"); end
      checks++;
      if (n_multi_layer == 0) begin failures++; $display("FAIL no multi-layer carry merge"); end
      $display("products=%0d back_to_back=%0d clock_lag=%0d full_merge=%0d msb=%0d multi_layer_merge=%0d",
               n_out, n_throughput, n_clock_lag, n_full_merge, n_msb, n_multi_layer);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
