// tb_timed_pipeline: timed model of the mesochronous multiplier, for
// simulation only.
//
// It is assembled from the same RTL blocks as mpp_multiplier (register
// stages, wave-pipelined stages, clock delay elements), but every logic
// stage is followed by tb_bus_delay, which gives each bit its own
// propagation delay between DMIN_PS and DMAX_PS (flip-flop clock-to-output
// delay included), and every register input is watched by a
// tb_timing_window monitor with the flip-flop's setup and hold times. The
// clock reaches register stage k+1 through a CLK_DELAY_PS delay element.
// With stage delays of several clock periods this shows several data
// waves inside one logic stage at a time, and the monitors show whether
// the clock period and the stage delay spread satisfy
//   dmax - dmin <= Tclk - (ts + th).
// For simplicity all intermediate register stages here carry the
// operands, sum and carry vectors (64 bits).
`timescale 1ps / 1ps
module tb_timed_pipeline #(
  parameter int unsigned DMIN_PS      = 1195,
  parameter int unsigned DMAX_PS      = 1375,
  parameter int unsigned CLK_DELAY_PS = 1400,
  parameter longint      START_PS     = 20000
) (
  input  logic        clk_in,
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic [15:0] m,
  output logic [4:0]  clk_reg,
  output int          setup_violations,
  output int          hold_violations
);

  localparam int unsigned N  = 8;
  localparam int unsigned W  = 2 * N;
  localparam int unsigned BW = 2 * N + 2 * W;   // {x, y, s, c}

  logic [BW-1:0] q_reg [4];    // register outputs, inputs of stage k
  logic [BW-1:0] d_comb [4];   // stage outputs, no delay
  logic [BW-1:0] d_late [4];   // stage outputs after the path delays
  int setup_v [4];
  int hold_v [4];
  int edges [4];

  assign clk_reg[0] = clk_in;
  for (genvar k = 0; k < 4; k++) begin : g_clk
    mpp_clock_delay #(.DELAY_PS(CLK_DELAY_PS), .BUFFER_DELAY_PS(100)) u_delay (
      .clk_in(clk_reg[k]), .clk_out(clk_reg[k+1])
    );
  end

  logic [2*N-1:0] in_q;
  mpp_register #(.WIDTH(2 * N)) u_reg_in (.clk(clk_reg[0]), .d({x, y}), .q(in_q));
  assign q_reg[0] = {in_q, {2 * W{1'b0}}};

  for (genvar k = 0; k < 4; k++) begin : g_stage
    mpp_wave_stage #(.N(N), .FIRST_LAYER(4 * k), .NUM_LAYERS(4)) u_stage (
      .x_in (q_reg[k][BW-1 -: N]),
      .y_in (q_reg[k][BW-N-1 -: N]),
      .s_in (q_reg[k][2*W-1 -: W]),
      .c_in (q_reg[k][W-1:0]),
      .x_out(d_comb[k][BW-1 -: N]),
      .y_out(d_comb[k][BW-N-1 -: N]),
      .s_out(d_comb[k][2*W-1 -: W]),
      .c_out(d_comb[k][W-1:0])
    );
    tb_bus_delay #(.WIDTH(BW), .DMIN_PS(DMIN_PS), .DMAX_PS(DMAX_PS), .BUFFER_DELAY_PS(100)) u_path (
      .d(d_comb[k]), .q(d_late[k])
    );
    tb_timing_window #(
      .WIDTH(BW), .TSETUP_PS(mpp_pkg::SAFF_TSETUP_PS), .THOLD_PS(mpp_pkg::SAFF_THOLD_PS),
      .START_PS(START_PS)
    ) u_window (
      .d(d_late[k]), .clk(clk_reg[k+1]),
      .setup_violations(setup_v[k]), .hold_violations(hold_v[k]), .edges(edges[k])
    );
    if (k < 3) begin : g_reg
      mpp_register #(.WIDTH(BW)) u_reg (.clk(clk_reg[k+1]), .d(d_late[k]), .q(q_reg[k+1]));
    end
  end

  mpp_register #(.WIDTH(W)) u_reg_out (.clk(clk_reg[4]), .d(d_late[3][2*W-1 -: W]), .q(m));

  assign setup_violations = setup_v[0] + setup_v[1] + setup_v[2] + setup_v[3];
  assign hold_violations  = hold_v[0] + hold_v[1] + hold_v[2] + hold_v[3];

endmodule
