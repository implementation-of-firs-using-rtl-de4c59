// cfg_lut: run-time reconfigurable look-up table with DEPTH = 2^AW one-bit
// entries, modelled on the configurable 5-input LUT of current FPGAs.
//
// The truth table is a shift register.  While ce is high, each rising clock
// edge shifts cdi in at entry 0 and moves every entry up by one; after DEPTH
// such cycles the first bit shifted in sits at entry DEPTH-1.  A reload of
// the whole table therefore takes DEPTH (32) cycles.  o is the entry
// selected by addr (combinational read); cdo is the top entry, so tables
// can be chained.  The table has no reset, like the FPGA primitive; its
// contents are only defined after a full reload.  The serial loading and
// the 32-cycle reload follow the source design; the port names are this
// design's own.
module cfg_lut #(
  parameter int unsigned AW    = 5,
  parameter int unsigned DEPTH = 2 ** AW
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          cdi,
  input  logic [AW-1:0] addr,
  output logic          o,
  output logic          cdo
);

  logic [DEPTH-1:0] table_q;

  always_ff @(posedge clk) begin
    if (ce) table_q <= {table_q[DEPTH-2:0], cdi};
  end

  assign o   = table_q[addr];
  assign cdo = table_q[DEPTH-1];

endmodule
