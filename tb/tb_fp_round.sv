// tb_fp_round: checks rounding of the 1.59 mantissa quotient. The
// reference keeps 53 significant bits from the leading one, and rounds to
// nearest with ties to even by comparing the discarded bits with half of
// the last kept bit, computed on the integer value rather than from
// guard, round and sticky bits. Random values of both binades, exact ties,
// and the all-ones values that carry out are applied.
`timescale 1ns/1ps
module tb_fp_round;
  logic [59:0] q;
  logic [53:0] m54;
  logic        below_one;
  fp_round dut (.q, .m54, .below_one);

  int checks = 0, failures = 0, n_carry = 0, n_tie = 0;

  // watchdog: one check per nanosecond is far more than needed
  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [59:0] v, rest, half;
      logic [53:0] kept, e;
      int sh;
      v = {1'b1, 27'($urandom), 32'($urandom)};
      if (i % 2 == 1) v[59] = 1'b0;
      if (v[59:58] == 2'b00) v[58] = 1'b1;
      if (i % 7 == 0) v[5:0] = 6'b100000;                 // tie for q >= 1
      if (i % 11 == 0) begin v[59] = 1'b0; v[4:0] = 5'b10000; end   // tie below one
      if (i == 3) v = '1;
      if (i == 5) v = {1'b0, {59{1'b1}}};
      sh   = v[59] ? 7 : 6;
      kept = 54'(v >> sh);
      rest = v & ((60'(1) << sh) - 1);
      half = 60'(1) << (sh - 1);
      e    = kept + ((rest > half || (rest == half && kept[0])) ? 54'd1 : 54'd0);
      if (rest == half) n_tie++;
      if (e[53]) n_carry++;
      q = v;
      #1;
      checks++;
      if (m54 !== e || below_one !== ~v[59]) begin
        failures++;
        if (failures < 5) $display("q=%h got %h/%b expected %h", v, m54, below_one, e);
      end
    end
    if (n_carry == 0 || n_tie == 0) begin failures++; $display("no carry or no tie tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
