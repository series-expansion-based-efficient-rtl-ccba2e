// pbm51: 51 x 51-bit partial block multiplier (PBM).
// Each operand is cut into three 17-bit blocks, a = {aU, aM, aL} and
// b = {bU, bM, bL}, so a*b is the sum of nine 17x17 block products. The
// three least significant ones (aL*bL, aL*bM, aM*bL) are left out; the six
// that remain fit six 17x17 (MULT18x18 / DSP48) multipliers. The result is
// therefore short of the exact product by at most
// (2^17-1)^2 + 2*(2^17-1)^2*2^17, all of it below bit 52.
// The six products are summed in three chains, as in the DSP48 cascade:
//   g2 = aU*bU, g1 = aU*bM + aM*bU, g0 = aU*bL + aM*bM + aL*bU,
//   p  = ((g2 << 34) + (g1 << 17) + g0) << 34.
// Pipeline (latency 5, one product per clock): 1 operand register,
// 2 block products, 3 chain sums, 4 g0 + g1<<17, 5 final sum.
// The choice of blocks and the latency follow the divider; the split of
// the adder tree over the pipeline stages is this design's.
module pbm51 (
  input  logic          clk,
  input  logic [50:0]   a,
  input  logic [50:0]   b,
  output logic [101:0]  p     // truncated product, bits [33:0] are zero
);
  logic [50:0] a_r, b_r;
  logic [33:0] uu, um, mu, ul, mm, lu;
  logic [33:0] g2, g2_d;
  logic [34:0] g1;
  logic [35:0] g0;
  logic [52:0] s0;
  logic [67:0] s;

  always_ff @(posedge clk) begin
    a_r <= a;
    b_r <= b;
    uu  <= a_r[50:34] * b_r[50:34];
    um  <= a_r[50:34] * b_r[33:17];
    mu  <= a_r[33:17] * b_r[50:34];
    ul  <= a_r[50:34] * b_r[16:0];
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
