// rcm_fir_top: top level of the reconfigurable-constant-multiplication FIR
// design.  Two independent datapaths sit side by side, each with its own
// ports:
//
//  * The block FIR filter: fir_frame_ctrl takes a block of NIN samples
//    (ip) on start and streams it, followed by zeros, through fir_rcm, a
//    TAPS-tap FIR whose tap multipliers are fused adder-graph reconfigurable
//    constant multipliers (rcm_pag).  coef_sel chooses, per tap, which of
//    the constants 1912, 1111 and 1331 the tap applies; it may change
//    between blocks (or between samples).  The full convolution result
//    appears on op, one value per clock, marked by op_en; done pulses with
//    the last value.
//
//  * The LUT-based reconfigurable constant multiplier kcm_rcm: y = x * c,
//    with c rewritten into its partial-product tables in 32 cycles on
//    kcm_reconf_req.
//
// Timing: op_en is first high 6 cycles after the clock edge that samples
// start (1 clear, 4 filter, 1 output register), and the NIN+TAPS-1 results
// follow on consecutive cycles.  The KCM path has a latency of 2 cycles at its
// default size.  rst is synchronous and active high for both paths.
module rcm_fir_top
  import rcm_pkg::*;
#(
  parameter int unsigned WX   = 16,
  parameter int unsigned NIN  = 3,
  parameter int unsigned TAPS = 3,
  parameter int unsigned WO   = WX + COEF_GROWTH + $clog2(TAPS),
  parameter int unsigned KBX  = 8,
  parameter int unsigned KBC  = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  // block FIR filter
  input  logic                    start,
  input  logic signed [WX-1:0]    ip [NIN],
  input  rcm_cfg_e                coef_sel [TAPS],
  output logic signed [WO-1:0]    op,
  output logic                    op_en,
  output logic                    busy,
  output logic                    done,
  // reconfigurable LUT-based constant multiplier
  input  logic                    kcm_x_valid,
  input  logic signed [KBX-1:0]   kcm_x,
  input  logic                    kcm_reconf_req,
  input  logic signed [KBC-1:0]   kcm_coef,
  output logic                    kcm_reconf_busy,
  output logic                    kcm_reconf_done,
  output logic                    kcm_y_valid,
  output logic signed [KBX+KBC-1:0] kcm_y
);

  logic                 fir_clear, fir_x_valid, fir_y_valid;
  logic signed [WX-1:0] fir_x;
  logic signed [WO-1:0] fir_y;

  fir_frame_ctrl #(.WX(WX), .WO(WO), .NIN(NIN), .TAPS(TAPS)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .start      (start),
    .ip         (ip),
    .fir_clear  (fir_clear),
    .fir_x_valid(fir_x_valid),
    .fir_x      (fir_x),
    .fir_y_valid(fir_y_valid),
    .fir_y      (fir_y),
    .op         (op),
    .op_en      (op_en),
    .busy       (busy),
    .done       (done)
  );

  fir_rcm #(.WX(WX), .TAPS(TAPS), .WO(WO)) u_fir (
    .clk     (clk),
    .rst     (rst),
    .clear   (fir_clear),
    .coef_sel(coef_sel),
    .x_valid (fir_x_valid),
    .x       (fir_x),
    .y_valid (fir_y_valid),
    .y       (fir_y)
  );

  kcm_rcm #(.BX(KBX), .BC(KBC)) u_kcm (
    .clk        (clk),
    .rst        (rst),
    .x_valid    (kcm_x_valid),
    .x          (kcm_x),
    .reconf_req (kcm_reconf_req),
    .coef       (kcm_coef),
    .reconf_busy(kcm_reconf_busy),
    .reconf_done(kcm_reconf_done),
    .y_valid    (kcm_y_valid),
    .y          (kcm_y)
  );

endmodule
