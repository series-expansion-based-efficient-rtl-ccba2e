// fp_normalize: normalisation and final output of the divider. A carry out
// of rounding (m54[53]) shifts the mantissa right by one and raises the
// exponent; the exponent is then biased,
//   e = exp_tmp + 1023 - below_one + carry,
// and checked: e >= 2047 gives infinity with overflow, e <= 0 gives zero
// with underflow (no subnormal results). A special class decided by
// pre-processing replaces the computed value. Outputs are registered
// (latency 1). Range handling and flags are this design's choice.
module fp_normalize
  import fpdiv_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic               sign,
  input  logic signed [12:0] exp_tmp,
  input  logic [53:0]        m54,
  input  logic               below_one,
  input  special_e           special,
  input  logic               invalid,
  input  logic               div_by_zero,
  output logic               out_valid,
  output fp64_t              q,
  output status_t            status
);
  localparam logic signed [13:0] E_TOP  = 14'(EXP_MAX);   // all-ones exponent, 2047
  localparam logic signed [13:0] E_BIAS = 14'(BIAS);      // 1023
  logic signed [13:0] e;
  logic [51:0]        frac;
  fp64_t              q_c;
  status_t            st_c;

  always_comb begin
    e    = 14'(exp_tmp) + E_BIAS - 14'(below_one) + 14'(m54[53]);
    frac = m54[53] ? m54[52:1] : m54[51:0];
    st_c = '{invalid: invalid, div_by_zero: div_by_zero, overflow: 1'b0, underflow: 1'b0};
    unique case (special)
      SPC_NAN:  q_c = QNAN;
      SPC_INF:  q_c = '{sign: sign, exp: '1, frac: '0};
      SPC_ZERO: q_c = '{sign: sign, exp: '0, frac: '0};
      default: begin
        if (e >= E_TOP) begin
          q_c = '{sign: sign, exp: '1, frac: '0};
          st_c.overflow = 1'b1;
        end else if (e <= 14'sd0) begin
          q_c = '{sign: sign, exp: '0, frac: '0};
          st_c.underflow = 1'b1;
        end else begin
          q_c = '{sign: sign, exp: e[10:0], frac: frac};
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    q      <= q_c;
    status <= st_c;
  end
endmodule
