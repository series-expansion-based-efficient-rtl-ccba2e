// fp_preproc: pre-processing of the divider (unpacking and exception
// check). It splits dividend X and divisor Y into sign, biased exponent and
// 53-bit mantissa with the hidden one, and classifies the pair: when the
// quotient follows from the operands alone (NaN, infinity, zero) it says
// which, so the datapath result is overridden at the output.
// The datapath handles normalised numbers only; an operand with a zero
// exponent field (zero or subnormal) is taken as zero. The IEEE-754 rules
// used: NaN in -> quiet NaN; 0/0 and inf/inf -> NaN, invalid; inf/finite ->
// inf; finite/inf -> 0; non-zero/0 -> inf, div_by_zero; 0/non-zero -> 0.
// A signalling NaN operand also raises invalid. Timing: outputs registered,
// latency 1. The flag set and the subnormal flush are this design's choice.
module fp_preproc
  import fpdiv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  fp64_t       x,
  input  fp64_t       y,
  output logic        out_valid,
  output logic        sx, sy,
  output logic [10:0] ex, ey,
  output logic [52:0] mx, my,
  output special_e    special,
  output logic        invalid,
  output logic        div_by_zero
);
  logic x_zero, y_zero, x_inf, y_inf, x_nan, y_nan, snan;
  special_e spc;
  logic inv, dbz;

  always_comb begin
    x_zero = (x.exp == '0);
    y_zero = (y.exp == '0);
    x_inf  = (x.exp == '1) && (x.frac == '0);
    y_inf  = (y.exp == '1) && (y.frac == '0);
    x_nan  = (x.exp == '1) && (x.frac != '0);
    y_nan  = (y.exp == '1) && (y.frac != '0);
    snan   = (x_nan && !x.frac[51]) || (y_nan && !y.frac[51]);
    inv    = 1'b0;
    dbz    = 1'b0;
    if (x_nan || y_nan) begin
      spc = SPC_NAN; inv = snan;
    end else if ((x_inf && y_inf) || (x_zero && y_zero)) begin
      spc = SPC_NAN; inv = 1'b1;
    end else if (x_inf) begin
      spc = SPC_INF;
    end else if (y_zero) begin
      spc = SPC_INF; dbz = 1'b1;
    end else if (x_zero || y_inf) begin
      spc = SPC_ZERO;
    end else begin
      spc = SPC_NONE;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    sx          <= x.sign;
    sy          <= y.sign;
    ex          <= x.exp;
    ey          <= y.exp;
    mx          <= {1'b1, x.frac};
    my          <= {1'b1, y.frac};
    special     <= spc;
    invalid     <= inv;
    div_by_zero <= dbz;
  end
endmodule
