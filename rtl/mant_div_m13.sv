// mant_div_m13: mantissa quotient q = x / y by series expansion, m = 13.
// The divisor mantissa y = 1.f is split into a1 = 1.f[51:40] (13 bits with
// the hidden one) and a2 = 0.<12 zeros>f[39:0] (40 bits). A 4096-word table
// gives a1^-1, and with t = a1^-1 * a2 (t < 2^-12)
//   q = x*a1^-1 - x*a1^-1 * beta,
//   beta = alpha * (t - t^2),   alpha = 1 + t^2,
// the five-term expansion of x / (a1 + a2). Since t^2 < 2^-24, alpha is
// formed by appending t^2 below a leading one: no adder is needed.
// Seven stages, each pipelined:
//   1 table read (1)            2 x*a1^-1, 53-bit PBM (5); t, 51-bit PBM (5)
//   3 t^2, 51-bit squarer (4)   4 alpha, append (2); t - t^2, 60-bit sub (2)
//   5 beta, reduced 51-bit PBM (5)   6 x*a1^-1*beta, 51-bit PBM (5)
//   7 q, 60-bit sub (2)
// Latency 24 clocks, one new division per clock.
// Fixed-point scaling (value = integer * weight):
//   a1^-1 53 bits * 2^-53        x 53 bits * 2^-52
//   t  60 bits * 2^-72, 51 bits * 2^-63 (12 leading zeros dropped)
//   t^2 as squarer output * 2^-126
//   alpha 60 bits * 2^-59, 51 bits * 2^-50 (form 1.<24 zeros>X...)
//   beta 51 bits * 2^-63,  x*a1^-1 60 bits * 2^-59, 51 bits * 2^-50
//   q 60 bits * 2^-59, in (0.5, 2).
// Stages, multiplier types and alignment follow the divider's description;
// the bits kept of each product are this design's choice.
module mant_div_m13 (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [52:0]  x,        // dividend mantissa 1.52
  input  logic [51:0]  yf,       // divisor fraction (hidden one implied)
  output logic         out_valid,
  output logic [59:0]  q         // quotient 1.59
);
  localparam int unsigned LZ  = 12;
  localparam int unsigned LAT = 24;

  // ---- stage 1: table
  logic [52:0] rinv, x_d1;
  logic [51:0] yf_d1;
  recip_rom #(.ADDR_W(LZ), .DATA_W(53)) u_rom (.clk, .addr(yf[51:52-LZ]), .data(rinv));
  pipe_delay #(.W(53), .N(1)) u_dx (.clk, .d(x),  .q(x_d1));
  pipe_delay #(.W(52), .N(1)) u_dy (.clk, .d(yf), .q(yf_d1));

  // ---- stage 2: x*a1^-1 and t = a1^-1 * a2
  logic [105:0] xr_p;
  logic [101:0] t_p;
  logic [50:0]  a2_51;
  assign a2_51 = {yf_d1[51-LZ:0], (LZ-1)'(0)};
  pbm53 u_xr (.clk, .a(x_d1), .b(rinv), .p(xr_p));
  pbm51 u_t  (.clk, .a(rinv[52:2]), .b(a2_51), .p(t_p));

  logic [59:0] xr60, t60;
  assign xr60 = xr_p[105:46];
  assign t60  = t_p[101:42];

  // ---- stage 3: t^2
  logic [101:0] t2_p;
  logic [59:0]  t60_d3;
  pbm51_sq u_t2 (.clk, .a(t_p[101:51]), .p(t2_p));
  pipe_delay #(.W(60), .N(4)) u_dt (.clk, .d(t60), .q(t60_d3));

  // ---- stage 4: alpha = 1 + t^2 (append) and d = t - t^2
  logic [59:0] t2_60, d60, alpha60;
  assign t2_60 = 60'(t2_p[101:LZ+42]);
  add_sub_pipe #(.W(60), .SUB(1'b1)) u_d (.clk, .a(t60_d3), .b(t2_60), .s(d60));
  pipe_delay #(.W(60), .N(2)) u_alpha (.clk, .d({1'b1, 24'b0, t2_p[101:67]}), .q(alpha60));

  // ---- stage 5: beta = alpha * d
  logic [101:0] beta_p;
  pbm51_reduced #(.M(13)) u_beta (.clk, .a(alpha60[59:9]), .b(d60[59:9]), .p(beta_p));

  // ---- stage 6: x*a1^-1*beta
  logic [101:0] xb_p;
  logic [59:0]  xr60_d11, xr60_d;
  pipe_delay #(.W(60), .N(11)) u_dxr1 (.clk, .d(xr60), .q(xr60_d11));
  pbm51 u_xb (.clk, .a(xr60_d11[59:9]), .b(beta_p[100:50]), .p(xb_p));

  // ---- stage 7: q = x*a1^-1 - x*a1^-1*beta
  pipe_delay #(.W(60), .N(5)) u_dxr2 (.clk, .d(xr60_d11), .q(xr60_d));
  add_sub_pipe #(.W(60), .SUB(1'b1)) u_q (.clk, .a(xr60_d), .b(60'(xb_p[101:LZ+42])), .s(q));

  // ---- valid pipeline
  logic [LAT-1:0] vld;
  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LAT-2:0], in_valid};
  end
  assign out_valid = vld[LAT-1];

  // alpha must have the form 1.<16 zeros> in its top block
  always_ff @(posedge clk)
    if (!rst && vld[11])
      assert (alpha60[59] && alpha60[58:43] == '0)
        else $error("alpha out of form for the reduced PBM: %h", alpha60);
endmodule
