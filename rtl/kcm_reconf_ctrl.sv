// kcm_reconf_ctrl: reconfiguration controller of the LUT-based constant
// multiplier (kcm_rcm).
//
// The multiplier holds, for each L-bit chunk k of its input, a table of
// partial products pp_k(v) = c * v, v being the chunk value (unsigned for
// the low chunks, two's complement for the top chunk, which carries the
// sign bit).  Each table is BLUT one-bit cfg_lut primitives, one per
// product bit.  To switch to a new coefficient c, this controller computes
// the table entries on the fly and shifts them into all K*BLUT primitives
// in parallel, one entry per clock, highest entry first:
//
//   cycle t = 0 .. DEPTH-1:  entry e = DEPTH-1-t
//       cdi[k][b] = bit b of  c * chunk_k(e)     for e <  2^L
//       cdi[k][b] = 0                            for e >= 2^L (unused)
//
// A reload therefore lasts DEPTH = 32 cycles, the reconfiguration time of
// the source design.  Computing the table contents in hardware from the
// coefficient is this design's own choice (the source only says that the
// LUT contents are rewritten at run time).  After reset the controller loads
// INIT_COEF on its own.
//
// Interface: req with coef (sampled on the rising edge, while not busy)
// starts a reload; busy is high exactly during the DEPTH shifting cycles
// and equals the ce of the primitives; done pulses in the cycle after the
// last shift, when the new tables are complete.  ready is high when the
// tables hold a complete coefficient: it is low during reset, in the cycle
// after reset before the initial load starts, and while busy.
module kcm_reconf_ctrl #(
  parameter int unsigned BX        = 8,
  parameter int unsigned BC        = 4,
  parameter int unsigned L         = 4,
  parameter int unsigned K         = BX / L,
  parameter int unsigned BLUT      = L + BC,
  parameter int unsigned AW        = 5,
  parameter int unsigned DEPTH     = 2 ** AW,
  parameter logic signed [BC-1:0] INIT_COEF = '0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 req,
  input  logic signed [BC-1:0] coef,
  output logic                 busy,
  output logic                 done,
  output logic                 ready,
  output logic [BLUT-1:0]      cdi [K]
);

  logic signed [BC-1:0] coef_q;
  logic [AW-1:0]        cnt;
  logic                 pending;   // load INIT_COEF after reset

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      cnt     <= '0;
      coef_q  <= INIT_COEF;
      pending <= 1'b1;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (pending || req) begin
          busy    <= 1'b1;
          cnt     <= '0;
          pending <= 1'b0;
          if (!pending) coef_q <= coef;
        end
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == AW'(DEPTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ready = !busy && !pending && !rst;

  // Table entry being shifted in this cycle and its partial products.
  logic [AW-1:0] entry;
  assign entry = AW'(DEPTH - 1) - cnt;

  always_comb begin
    for (int k = 0; k < K; k++) begin
      logic signed [L:0]      chunk;   // one spare bit: unsigned chunks stay positive
      logic signed [BLUT-1:0] pp;
      if (k == K - 1) chunk = (L+1)'(signed'(entry[L-1:0]));
      else            chunk = (L+1)'({1'b0, entry[L-1:0]});
      pp = BLUT'(coef_q) * BLUT'(chunk);
      if (AW > L && (entry >> L) != 0) cdi[k] = '0;
      else                             cdi[k] = pp;
    end
  end

  // A reload lasts exactly DEPTH cycles and done follows it directly.
  a_done_after_load: assert property (@(posedge clk) disable iff (rst)
                                      done |-> !busy && $past(busy, 1) && $past(busy, DEPTH));
  a_load_length:     assert property (@(posedge clk) disable iff (rst)
                                      $rose(busy) |-> busy [*DEPTH] ##1 !busy);

endmodule
