// sq34: 34-bit full squarer. With a = {aH, aL} in 17-bit blocks,
// a^2 = aH*aH << 34 + 2*aH*aL << 17 + aL*aL; the two equal cross products
// are formed once, so three 17x17 multipliers give the exact square.
// Pipeline (latency 3): 1 operand register, 2 block products, 3 sum.
module sq34 (
  input  logic         clk,
  input  logic [33:0]  a,
  output logic [67:0]  p     // exact square
);
  logic [33:0] a_r;
  logic [33:0] hh, hl, ll;

  always_ff @(posedge clk) begin
    a_r <= a;
    hh  <= a_r[33:17] * a_r[33:17];
    hl  <= a_r[33:17] * a_r[16:0];
    ll  <= a_r[16:0]  * a_r[16:0];
    p   <= (68'(hh) << 34) + (68'(hl) << 18) + 68'(ll);
  end
endmodule
