// fp_round: rounding of the 60-bit mantissa quotient (format 1.59, value in
// (0.5, 2)) to 53 bits, round to nearest, ties to even. The leading bit
// decides the rounding position: for q >= 1 the kept bits are q[59:7],
// otherwise q[58:6] and the exponent must drop by one (below_one). Guard,
// round and sticky bits are taken under the kept bits, and a 54-bit add
// applies the increment; bit 53 of the result is its carry, which
// normalisation removes. Combinational.
module fp_round (
  input  logic [59:0] q,
  output logic [53:0] m54,
  output logic        below_one
);
  logic [52:0] keep;
  logic        g, r, s, inc;

  always_comb begin
    below_one = ~q[59];
    if (q[59]) begin
      keep = q[59:7]; g = q[6]; r = q[5]; s = |q[4:0];
    end else begin
      keep = q[58:6]; g = q[5]; r = q[4]; s = |q[3:0];
    end
    inc = g & (r | s | keep[0]);
    m54 = {1'b0, keep} + 54'(inc);
  end
endmodule
