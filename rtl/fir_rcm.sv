// fir_rcm: three-tap direct-form FIR filter whose tap multipliers are
// run-time reconfigurable constant multipliers (rcm_pag).
//
//   y[n] = h0 * x[n] + h1 * x[n-1] + h2 * x[n-2],
//   hk   = {1912, 1111, 1331}[coef_sel[k]]
//
// Each tap owns one fused adder-graph multiplier; coef_sel[k] picks which
// of the three constants the tap applies, so the filter's coefficient set
// can be changed on any sample without reloading anything.  With
// coef_sel = {CFG_1331, CFG_1111, CFG_1912} (h0 = 1912, h1 = 1111,
// h2 = 1331) the filter has the impulse response of the reference example.
// The number of taps, the direct form and the registered output adder are
// this design's own choices.
//
// Interface: a sample x is taken when x_valid is high; the delay line only
// advances on valid samples.  clear (synchronous) empties the delay line so
// that a new block of samples starts from zero state.  y/y_valid follow a
// valid input by 4 cycles (3 multiplier stages + 1 adder stage), one output
// per input, at a throughput of one sample per clock.
module fir_rcm
  import rcm_pkg::*;
#(
  parameter int unsigned WX   = 16,
  parameter int unsigned TAPS = 3,
  parameter int unsigned WP   = WX + COEF_GROWTH,      // product width
  parameter int unsigned WO   = WP + $clog2(TAPS)      // output width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clear,
  input  rcm_cfg_e             coef_sel [TAPS],
  input  logic                 x_valid,
  input  logic signed [WX-1:0] x,
  output logic                 y_valid,
  output logic signed [WO-1:0] y
);

  // tap_x[0] is the current sample, tap_x[k] the sample k valid inputs ago
  logic signed [WX-1:0] tap_x [TAPS];
  logic signed [WX-1:0] dly   [1:TAPS-1];
  logic signed [WP-1:0] prod  [TAPS];
  logic [TAPS-1:0]      prod_valid;

  assign tap_x[0] = x;
  for (genvar k = 1; k < TAPS; k++) begin : g_tapx
    assign tap_x[k] = dly[k];
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int k = 1; k < TAPS; k++) dly[k] <= '0;
    end else if (x_valid) begin
      dly[1] <= x;
      for (int k = 2; k < TAPS; k++) dly[k] <= dly[k-1];
    end
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    rcm_pag #(.WX(WX), .WY(WP)) u_mult (
      .clk      (clk),
      .rst      (rst),
      .in_valid (x_valid),
      .cfg      (coef_sel[k]),
      .x        (tap_x[k]),
      .out_valid(prod_valid[k]),
      .y        (prod[k])
    );
  end

  logic signed [WO-1:0] sum;
  always_comb begin
    sum = '0;
    for (int k = 0; k < TAPS; k++) sum += WO'(prod[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= &prod_valid;
      if (&prod_valid) y <= sum;
    end
  end

endmodule
