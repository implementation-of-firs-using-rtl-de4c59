// kcm_rcm: run-time reconfigurable LUT-based signed constant multiplier
// (KCM), y = x * c.
//
// The BX-bit input is cut into K = BX/L chunks of L bits.  Chunk k
// addresses its own table of partial products c * chunk_k, BLUT = L + BC
// bits wide, built from BLUT one-bit cfg_lut primitives; the top chunk holds
// the sign bit of x and is read as a signed number, the others as unsigned
// numbers.  The table outputs are registered, shifted by k*L (wiring) and
// summed by a pipelined binary adder tree with a register after every
// adder level:
//
//   y = sum_k  pp_k(chunk_k) * 2^(k*L)
//
// The coefficient is changed at run time by rewriting the tables through
// kcm_reconf_ctrl, which takes 32 clock cycles.  The chunk-wise tables, the
// registered table outputs, the pipelined adder tree, the 8x4-bit signed
// example with 4-bit chunks and 8-bit tables, and the 32-cycle
// reconfiguration follow the source design; the coefficient-to-table
// computation, the valid tracking and the reset-time load of INIT_COEF are
// this design's own.
//
// Interface: x/x_valid are sampled every clock; y/y_valid follow after
// LATENCY = 1 + clog2(K) cycles (2 for the 8x4 default).  reconf_req with
// coef starts a reload; reconf_busy is high for the 32 reload cycles (and
// from reset until the initial load is complete) and samples entering then
// come out with y_valid low.  Samples entering after
// reconf_busy falls are multiplied by the new coefficient.
module kcm_rcm #(
  parameter int unsigned BX   = 8,          // input width (signed)
  parameter int unsigned BC   = 4,          // coefficient width (signed)
  parameter int unsigned L    = 4,          // input bits per table
  parameter int unsigned AW   = 5,          // address bits of a cfg_lut
  parameter logic signed [BC-1:0] INIT_COEF = '0,
  parameter int unsigned K    = BX / L,     // number of tables
  parameter int unsigned BLUT = L + BC,     // table output width
  parameter int unsigned BY   = BX + BC     // product width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_valid,
  input  logic signed [BX-1:0] x,
  input  logic                 reconf_req,
  input  logic signed [BC-1:0] coef,
  output logic                 reconf_busy,
  output logic                 reconf_done,
  output logic                 y_valid,
  output logic signed [BY-1:0] y
);

  localparam int unsigned LVL     = $clog2(K);
  localparam int unsigned NP      = 2 ** LVL;
  localparam int unsigned LATENCY = 1 + LVL;

  if (BX % L != 0) begin : g_bad_chunking
    $error("kcm_rcm: BX must be a multiple of L");
  end
  if (L > AW) begin : g_bad_aw
    $error("kcm_rcm: a table of L address bits does not fit a cfg_lut");
  end

  logic [BLUT-1:0] cdi [K];
  logic            cfg_ce, tables_ready;

  kcm_reconf_ctrl #(
    .BX(BX), .BC(BC), .L(L), .K(K), .BLUT(BLUT), .AW(AW),
    .INIT_COEF(INIT_COEF)
  ) u_ctrl (
    .clk  (clk),
    .rst  (rst),
    .req  (reconf_req),
    .coef (coef),
    .busy (cfg_ce),
    .done (reconf_done),
    .ready(tables_ready),
    .cdi  (cdi)
  );
  assign reconf_busy = !tables_ready;

  // Partial-product tables
  logic [BLUT-1:0] pp [K];
  for (genvar k = 0; k < K; k++) begin : g_tab
    for (genvar b = 0; b < BLUT; b++) begin : g_bit
      cfg_lut #(.AW(AW)) u_lut (
        .clk (clk),
        .ce  (cfg_ce),
        .cdi (cdi[k][b]),
        .addr(AW'(x[k*L +: L])),
        .o   (pp[k][b]),
        .cdo ()
      );
    end
  end

  // Registered table outputs (level 0) and pipelined adder tree.
  logic signed [BY-1:0] tree [LVL+1][NP];
  logic [LATENCY-1:0]   vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l <= LVL; l++)
        for (int i = 0; i < NP; i++) tree[l][i] <= '0;
      vld <= '0;
    end else begin
      for (int i = 0; i < NP; i++) begin
        if (i < K) tree[0][i] <= BY'(signed'(pp[i])) <<< (i * L);
        else       tree[0][i] <= '0;
      end
      for (int l = 1; l <= LVL; l++)
        for (int i = 0; i < (NP >> l); i++)
          tree[l][i] <= tree[l-1][2*i] + tree[l-1][2*i+1];
      vld <= LATENCY'({vld, x_valid && tables_ready});
    end
  end

  assign y       = tree[LVL][0];
  assign y_valid = vld[LATENCY-1];

endmodule
