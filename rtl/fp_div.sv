// fp_div: pipelined IEEE-754 double precision divider Q = X / Y built on
// a Taylor-series expansion of the divisor's reciprocal.
// Data flow: pre-processing (unpack, exception check, 1 clock) feeds the
// sign/exponent path and the mantissa datapath in parallel; the 60-bit
// mantissa quotient is rounded to nearest (ties to even), normalised, and
// joined with sign, exponent and status flags in the output register.
// M_BITS selects the mantissa datapath:
//   9  -> mant_div_m9  (256-word table, 28 17x17 multipliers), latency 29
//   13 -> mant_div_m13 (4096-word table, 25 17x17 multipliers), latency 26
// Interface: a new operand pair may enter on every clock with in_valid;
// the result appears LATENCY clocks later with out_valid. rst clears the
// valid pipeline only. Results are accurate to within about 2 ulp (not
// correctly rounded); subnormal operands and results are flushed to zero.
// The two latencies are those of the published implementations; their
// split into 1 + datapath + 1 clocks is this design's.
module fp_div
  import fpdiv_pkg::*;
#(
  parameter int unsigned M_BITS = 9
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  fp64_t   x,
  input  fp64_t   y,
  output logic    out_valid,
  output fp64_t   q,
  output status_t status
);
  localparam int unsigned MLAT    = (M_BITS == 13) ? 24 : 27;
  localparam int unsigned LATENCY = MLAT + 2;

  // ---- pre-processing
  logic        p_valid, sx, sy, p_inv, p_dbz;
  logic [10:0] ex, ey;
  logic [52:0] mx, my;
  special_e    p_spc;

  fp_preproc u_pre (
    .clk, .rst, .in_valid, .x, .y,
    .out_valid(p_valid), .sx, .sy, .ex, .ey, .mx, .my,
    .special(p_spc), .invalid(p_inv), .div_by_zero(p_dbz)
  );

  // ---- mantissa datapath
  logic        m_valid;
  logic [59:0] mq;

  if (M_BITS == 13) begin : g_m13
    mant_div_m13 u_mant (.clk, .rst, .in_valid(p_valid), .x(mx), .yf(my[51:0]),
                         .out_valid(m_valid), .q(mq));
  end else begin : g_m9
    mant_div_m9  u_mant (.clk, .rst, .in_valid(p_valid), .x(mx), .yf(my[51:0]),
                         .out_valid(m_valid), .q(mq));
  end

  // ---- sign and exponent, and the exception class, kept in step
  logic               q_sign;
  logic signed [12:0] exp_tmp;
  special_e           d_spc;
  logic               d_inv, d_dbz;

  sign_exp #(.LAT(MLAT)) u_se (.clk, .sx, .sy, .ex, .ey, .sign(q_sign), .exp_tmp);
  pipe_delay #(.W(4), .N(MLAT)) u_dspc (.clk, .d({p_spc, p_inv, p_dbz}),
                                        .q({d_spc, d_inv, d_dbz}));

  // ---- rounding, normalisation and output
  logic [53:0] m54;
  logic        below_one;

  fp_round u_rnd (.q(mq), .m54, .below_one);

  fp_normalize u_norm (
    .clk, .rst, .in_valid(m_valid), .sign(q_sign), .exp_tmp, .m54, .below_one,
    .special(d_spc), .invalid(d_inv), .div_by_zero(d_dbz),
    .out_valid, .q, .status
  );

  // the output valid must trail the input valid by exactly LATENCY clocks
  logic [LATENCY-1:0] vchk;
  always_ff @(posedge clk) begin
    if (rst) vchk <= '0;
    else     vchk <= {vchk[LATENCY-2:0], in_valid};
  end
  always_ff @(posedge clk)
    if (!rst) assert (out_valid == vchk[LATENCY-1])
      else $error("fp_div: out_valid out of step with the pipeline latency");
endmodule
