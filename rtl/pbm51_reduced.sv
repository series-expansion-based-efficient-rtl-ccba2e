// pbm51_reduced: 51-bit partial block multiplier for a first operand whose
// top 17-bit block is nearly a power of two. a is read as 1.50 fixed point,
// a = {aU, aM, aL}, and
//   M = 9 : aU = 1.<15 zeros>X, i.e. a[49:35] = 0 and X = a[34];
//   M = 13: aU = 1.<16 zeros>,  i.e. a[49:34] = 0.
// The products of aU with bU, bM and bL then need no multiplier:
// aU*bk = (bk << 16) + (X ? bk : 0) for M = 9, and bk << 16 for M = 13.
// The other kept block products (aM*bU, aM*bM, aL*bU) use three 17x17
// multipliers; aL*bL, aL*bM and aM*bL are left out as in pbm51, so for such
// operands the result equals what pbm51 would give.
// Pipeline (latency 5) as pbm51. The operand form is checked by the
// instantiating datapath, which knows when the operand is valid.
module pbm51_reduced #(
  parameter int unsigned M = 9
) (
  input  logic          clk,
  input  logic [50:0]   a,
  input  logic [50:0]   b,
  output logic [101:0]  p     // truncated product, bits [33:0] are zero
);
  logic [50:0] a_r, b_r;
  logic [33:0] uu, um, ul, mu, mm, lu;
  logic [33:0] g2, g2_d;
  logic [34:0] g1;
  logic [35:0] g0;
  logic [52:0] s0;
  logic [67:0] s;

  // aU * bk by shift and AND
  function automatic logic [33:0] top_times(input logic xbit, input logic [16:0] bk);
    logic [33:0] r;
    r = 34'(bk) << 16;
    if (M == 9) r = r + (xbit ? 34'(bk) : 34'd0);
    return r;
  endfunction

  always_ff @(posedge clk) begin
    a_r <= a;
    b_r <= b;
    uu  <= top_times(a_r[34], b_r[50:34]);
    um  <= top_times(a_r[34], b_r[33:17]);
    ul  <= top_times(a_r[34], b_r[16:0]);
    mu  <= a_r[33:17] * b_r[50:34];
    mm  <= a_r[33:17] * b_r[33:17];
    lu  <= a_r[16:0]  * b_r[50:34];
    g2  <= uu;
    g1  <= 35'(um) + 35'(mu);
    g0  <= 36'(ul) + 36'(mm) + 36'(lu);
    s0  <= (53'(g1) << 17) + 53'(g0);
    g2_d <= g2;
    s   <= (68'(g2_d) << 34) + 68'(s0);
  end

  assign p = {s, 34'b0};
endmodule
