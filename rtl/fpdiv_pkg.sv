// fpdiv_pkg: types and constants shared by the series-expansion divider.
// IEEE-754 binary64 field widths, the exponent bias, the operand class
// produced by pre-processing, and the status flags of the final output.
// The four status flags are this design's choice; the divider only promises
// "status signals" next to the final output.
package fpdiv_pkg;
  localparam int unsigned EXP_W  = 11;
  localparam int unsigned FRAC_W = 52;
  localparam int unsigned BIAS   = (1 << (EXP_W - 1)) - 1; // 1023
  localparam int unsigned EXP_MAX = (1 << EXP_W) - 1;     // 2047

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  // result class decided from the operands alone
  typedef enum logic [1:0] {
    SPC_NONE = 2'd0,   // ordinary quotient, computed by the datapath
    SPC_ZERO = 2'd1,   // signed zero
    SPC_INF  = 2'd2,   // signed infinity
    SPC_NAN  = 2'd3    // quiet NaN
  } special_e;

  typedef struct packed {
    logic invalid;      // 0/0, inf/inf or a NaN operand
    logic div_by_zero;  // finite non-zero / zero
    logic overflow;     // exponent above the binary64 range
    logic underflow;    // exponent below the normal range (flushed to zero)
  } status_t;

  localparam fp64_t QNAN = '{sign: 1'b0, exp: '1, frac: {1'b1, {(FRAC_W-1){1'b0}}}};
endpackage
