// rcm_pkg: shared constants and types for the reconfigurable constant
// multiplier (RCM) FIR design.
//
// The fused adder graph switches between three constants, 1912, 1111 and
// 1331 (the running example the design is built around).  A configuration
// is selected by a 2-bit code; code 3 is not used and behaves like code 2.
// The data width of the filter input (16 bits, signed) is this design's own
// choice; the widths of products and sums follow from it.
package rcm_pkg;

  // Configuration codes of the fused multiplier.
  typedef enum logic [1:0] {
    CFG_1912 = 2'd0,
    CFG_1111 = 2'd1,
    CFG_1331 = 2'd2
  } rcm_cfg_e;

  // Largest constant is 1912 < 2^11: a product grows by 11 bits.
  localparam int unsigned COEF_GROWTH = 11;

  // Constant realised by each configuration (reference value for checks
  // and documentation; the multiplier itself only uses shifts and adds).
  function automatic int unsigned cfg_const(rcm_cfg_e c);
    unique case (c)
      CFG_1912: return 1912;
      CFG_1111: return 1111;
      default:  return 1331;
    endcase
  endfunction

endpackage
