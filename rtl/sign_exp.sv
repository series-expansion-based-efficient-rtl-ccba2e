// sign_exp: sign and exponent of the quotient. The sign is the XOR of the
// operand signs; the temporary exponent is Ex - Ey, in which the two biases
// cancel. Both are computed at once and then carried through LAT registers
// so that they reach the output stage together with the mantissa quotient;
// the bias is added back, and the exponent adjusted, after normalisation.
// Timing: latency LAT (default 27, the m = 9 mantissa datapath).
// The 13-bit signed width of the temporary exponent is this design's.
module sign_exp #(
  parameter int unsigned LAT = 27
) (
  input  logic               clk,
  input  logic               sx,
  input  logic               sy,
  input  logic [10:0]        ex,
  input  logic [10:0]        ey,
  output logic               sign,
  output logic signed [12:0] exp_tmp
);
  logic        s_c;
  logic [12:0] e_c, e_q;

  assign s_c = sx ^ sy;
  assign e_c = 13'(ex) - 13'(ey);

  pipe_delay #(.W(14), .N(LAT)) u_d (.clk, .d({s_c, e_c}), .q({sign, e_q}));
  assign exp_tmp = signed'(e_q);
endmodule
