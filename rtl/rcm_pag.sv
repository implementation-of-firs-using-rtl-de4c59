// rcm_pag: pipelined run-time reconfigurable constant multiplier built by
// fusing the pipelined adder graphs (PAGs) of the constants 1912, 1111 and
// 1331 into one graph with multiplexers and a switchable adder/subtractor.
//
//   y = x * 1912   when cfg = CFG_1912
//   y = x * 1111   when cfg = CFG_1111
//   y = x * 1331   (cfg = CFG_1331, also code 3)
//
// Every node is an "A-operation" 2^l1*u +/- 2^l2*v of two earlier nodes,
// and every node output is registered, so every path from x to y crosses
// exactly three registers (three pipeline stages):
//
//   stage 1:  p17  = x + (x << 4)                         = 17x (shared)
//   stage 2:  left = (p17 << 4) + x                       = 273x
//             right= (x << 8) - p17   (1912, 1331)        = 239x
//                    (x << 1) + p17   (1111)              =  19x
//   stage 3:  y    = (left << 2) + (right << 3)  (1912, left = 0)
//             y    = (left << 2) +  right        (1111, 1331)
//
// In configuration 1912 the left stage-2 node is unused ("-"): its input
// to the output adder is zero, realised by clearing the stage-2 register
// instead of a multiplexer input.  The constants, the stage-2 node values
// (273/273 and 239/19/239), the shifts <<2 and <<3 at the output-adder
// multiplexers and the zeroing by register reset follow the source design;
// the stage-1 node 17x and the shift choice on the right node (x<<8 or
// x<<1) are the decomposition worked out here, since only the last two
// stages of the fused graph are specified.
//
// Interface: x/in_valid/cfg are sampled on the rising clock edge; y and
// out_valid appear three cycles later.  The configuration travels with the
// data through the pipeline, so cfg may change on any cycle and each sample
// is multiplied by the constant selected when it entered.  rst is a
// synchronous, active-high reset of the valid bits and the data registers.
module rcm_pag
  import rcm_pkg::*;
#(
  parameter int unsigned WX = 16,                // input width (signed)
  parameter int unsigned WY = WX + COEF_GROWTH   // product width (signed)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  rcm_cfg_e             cfg,
  input  logic signed [WX-1:0] x,
  output logic                 out_valid,
  output logic signed [WY-1:0] y
);

  localparam int unsigned LATENCY = 3;

  // Stage 1 registers
  logic signed [WY-1:0] s1_p17, s1_x;
  rcm_cfg_e             s1_cfg;
  // Stage 2 registers
  logic signed [WY-1:0] s2_left, s2_right;
  rcm_cfg_e             s2_cfg;
  logic [LATENCY-1:0]   vld;

  logic signed [WY-1:0] x_ext;
  assign x_ext = WY'(x);

  // Stage 1: the shared node 17x.
  always_ff @(posedge clk) begin
    if (rst) begin
      s1_p17 <= '0;
      s1_x   <= '0;
      s1_cfg <= CFG_1912;
    end else begin
      s1_p17 <= x_ext + (x_ext <<< 4);
      s1_x   <= x_ext;
      s1_cfg <= cfg;
    end
  end

  // Stage 2: the two fused nodes.
  logic signed [WY-1:0] right_sh;
  logic                 right_sub;
  always_comb begin
    right_sub = (s1_cfg != CFG_1111);
    right_sh  = right_sub ? (s1_x <<< 8) : (s1_x <<< 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_left  <= '0;
      s2_right <= '0;
      s2_cfg   <= CFG_1912;
    end else begin
      // zero input of the output adder: clear the register instead of muxing
      if (s1_cfg == CFG_1912) s2_left <= '0;
      else                    s2_left <= (s1_p17 <<< 4) + s1_x;
      s2_right <= right_sub ? (right_sh - s1_p17) : (right_sh + s1_p17);
      s2_cfg   <= s1_cfg;
    end
  end

  // Stage 3: output adder with the shift multiplexer on the right input.
  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= (s2_left <<< 2) +
                  ((s2_cfg == CFG_1912) ? (s2_right <<< 3) : s2_right);
  end

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
