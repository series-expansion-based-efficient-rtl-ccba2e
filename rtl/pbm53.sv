// pbm53: 53 x 53-bit partial block multiplier, used for x * a1^-1.
// Operands are cut as a = {a2, aU, aM, aL} with a 2-bit top block and three
// 17-bit blocks (likewise b). Of the block products, the three least
// significant 17x17 ones (aL*bL, aL*bM, aM*bL) are left out. Six 17x17
// products remain for the hard multipliers (aU*bU, aU*bM, aM*bU, aU*bL,
// aM*bM, aL*bU); the products with a 2-bit block are 2x17 or 2x2 and are
// small enough for logic. They are gathered as:
//   t2 = a2*b2 at 2^102,
//   tU = a2*bU + b2*aU at 2^85, tM = a2*bM + b2*aM at 2^68,
//   tL = a2*bL + b2*aL at 2^51,
//   g2 = aU*bU at 2^68, g1 = aU*bM + aM*bU at 2^51,
//   g0 = aU*bL + aM*bM + aL*bU at 2^34.
// The error against the exact product is below 2^52 (weight of bit 52).
// Pipeline (latency 5): 1 operand register, 2 block products, 3 chain
// sums, 4 two partial sums, 5 final sum. Block choice and latency follow
// the divider; the adder tree arrangement is this design's.
module pbm53 (
  input  logic          clk,
  input  logic [52:0]   a,
  input  logic [52:0]   b,
  output logic [105:0]  p     // truncated product, bits [33:0] are zero
);
  logic [52:0] a_r, b_r;
  logic [33:0] uu, um, mu, ul, mm, lu;
  logic [18:0] a2bu, b2au, a2bm, b2am, a2bl, b2al;
  logic [3:0]  a2b2;
  logic [33:0] g2;
  logic [34:0] g1;
  logic [35:0] g0;
  logic [19:0] tu, tm, tl;
  logic [3:0]  t2;
  logic [71:0] s_hi;   // weight 2^34
  logic [52:0] s_lo;   // weight 2^34
  logic [71:0] s;

  always_ff @(posedge clk) begin
    a_r  <= a;
    b_r  <= b;
    // stage 2: block products
    uu   <= a_r[50:34] * b_r[50:34];
    um   <= a_r[50:34] * b_r[33:17];
    mu   <= a_r[33:17] * b_r[50:34];
    ul   <= a_r[50:34] * b_r[16:0];
    mm   <= a_r[33:17] * b_r[33:17];
    lu   <= a_r[16:0]  * b_r[50:34];
    a2bu <= a_r[52:51] * b_r[50:34];
    b2au <= b_r[52:51] * a_r[50:34];
    a2bm <= a_r[52:51] * b_r[33:17];
    b2am <= b_r[52:51] * a_r[33:17];
    a2bl <= a_r[52:51] * b_r[16:0];
    b2al <= b_r[52:51] * a_r[16:0];
    a2b2 <= a_r[52:51] * b_r[52:51];
    // stage 3: chains
    g2   <= uu;
    g1   <= 35'(um) + 35'(mu);
    g0   <= 36'(ul) + 36'(mm) + 36'(lu);
    tu   <= 20'(a2bu) + 20'(b2au);
    tm   <= 20'(a2bm) + 20'(b2am);
    tl   <= 20'(a2bl) + 20'(b2al);
    t2   <= a2b2;
    // stage 4: two partial sums, both at weight 2^34
    s_hi <= (72'(t2) << 68) + (72'(tu) << 51) + (72'(tm) << 34) + (72'(g2) << 34);
    s_lo <= (53'(tl) << 17) + (53'(g1) << 17) + 53'(g0);
    // stage 5: final sum
    s    <= s_hi + 72'(s_lo);
  end

  assign p = {s, 34'b0};
endmodule
