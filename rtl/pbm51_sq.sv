// pbm51_sq: 51-bit partial block squarer, a^2 with a = {aU, aM, aL} in
// 17-bit blocks. It keeps the same six block products as pbm51, but
// aU*aM = aM*aU and aU*aL = aL*aU are formed once and doubled by a 1-bit
// shift, so four 17x17 multipliers do the work:
//   p = ((aU*aU << 68) + (2*aU*aM << 51) + ((2*aU*aL + aM*aM) << 34)).
// Error against the exact square is below 2^52, as for pbm51.
// Pipeline (latency 4): 1 operand register, 2 block products, 3 chain
// sums, 4 final sum. Sharing and latency follow the divider.
module pbm51_sq (
  input  logic          clk,
  input  logic [50:0]   a,
  output logic [101:0]  p     // truncated square, bits [33:0] are zero
);
  logic [50:0] a_r;
  logic [33:0] uu, um, ul, mm;
  logic [33:0] g2;
  logic [34:0] g1;
  logic [35:0] g0;
  logic [67:0] s;

  always_ff @(posedge clk) begin
    a_r <= a;
    uu  <= a_r[50:34] * a_r[50:34];
    um  <= a_r[50:34] * a_r[33:17];
    ul  <= a_r[50:34] * a_r[16:0];
    mm  <= a_r[33:17] * a_r[33:17];
    g2  <= uu;
    g1  <= {um, 1'b0};
    g0  <= {1'b0, ul, 1'b0} + 36'(mm);
    s   <= (68'(g2) << 34) + (68'(g1) << 17) + 68'(g0);
  end

  assign p = {s, 34'b0};
endmodule
