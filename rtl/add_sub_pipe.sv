// add_sub_pipe: W-bit adder (SUB = 0) or subtractor (SUB = 1) split into two
// pipeline stages, as the two-stage 60-bit adders and subtractors of the
// mantissa datapath. Stage 1 adds the low W/2 bits and registers the carry
// with the high halves; stage 2 adds the high halves with that carry.
// Latency 2, one new operation per clock. The result is modulo 2^W; the
// datapath only subtracts smaller values from larger ones.
// The two-stage depth follows the divider; the even split is this design's.
module add_sub_pipe #(
  parameter int unsigned W   = 60,
  parameter bit          SUB = 1'b0
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  localparam int unsigned LO = W / 2;
  localparam int unsigned HI = W - LO;

  logic [W-1:0]  b_eff;
  logic [LO:0]   lo_sum;
  logic [LO-1:0] lo_r;
  logic          c_r;
  logic [HI-1:0] ah_r, bh_r;

  assign b_eff  = SUB ? ~b : b;
  assign lo_sum = {1'b0, a[LO-1:0]} + {1'b0, b_eff[LO-1:0]} + (LO+1)'(SUB);

  always_ff @(posedge clk) begin
    lo_r <= lo_sum[LO-1:0];
    c_r  <= lo_sum[LO];
    ah_r <= a[W-1:LO];
    bh_r <= b_eff[W-1:LO];
    s    <= {ah_r + bh_r + HI'(c_r), lo_r};
  end
endmodule
