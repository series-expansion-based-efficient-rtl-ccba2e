// tb_fp_div: end-to-end test of fp_div at its default parameters (m = 9).
// Operand pairs stream in, mostly back to back with random bubbles; each
// expected quotient is the host's IEEE double division of the same
// operands ($bitstoreal / $realtobits), queued with the issue cycle. Every
// result must arrive exactly 29 clocks after its operands, lie within
// 2 ulp of the reference for ordinary operands, and match exactly (value
// and status flags) for NaN, infinity, zero, overflow and underflow.
// Directed operands make each mechanism occur and are counted: special
// classes, overflow, underflow, a rounding carry, quotients below one,
// divisors with the largest a2 (the reduced multiplier's X bit set), the
// table word 0 (divisor mantissa 1.0, saturated word), bubbles and
// full-rate issue.
`timescale 1ns/1ps
module tb_fp_div;
  import fpdiv_pkg::*;

  localparam int LAT    = 29;
  localparam int NRAND  = 5000000;

  logic    clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  fp64_t   x, y, q;
  status_t status;
  logic    out_valid;

  fp_div dut (.clk, .rst, .in_valid, .x, .y, .out_valid, .q, .status);

  always #5 clk = ~clk;

  typedef struct {
    logic [63:0] xb, yb, ref_q;
    status_t     ref_st;
    longint      cyc;
  } item_t;
  item_t exp_q [$];

  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_nan = 0, n_inf = 0, n_zero = 0, n_dbz = 0, n_ovf = 0, n_unf = 0,
      n_carry = 0, n_below = 0, n_xbit = 0, n_bubble = 0, n_b2b = 0,
      n_exact = 0, n_ok = 0, max_ulp = 0;
  longint sum_ulp = 0;


  // watchdog
  initial begin
    repeat (NRAND * 3 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd_normal(input int emin, input int emax);
    logic [63:0] r;
    r[63]    = 1'($urandom);
    r[62:52] = 11'(emin + int'($urandom_range(emax - emin)));
    r[51:0]  = {20'($urandom), 32'($urandom)};
    return r;
  endfunction

  // reference: IEEE division on the host, then the divider's own rules for
  // the cases it treats differently (subnormals flushed, one NaN pattern)
  function automatic item_t reference(input logic [63:0] xb, input logic [63:0] yb);
    item_t it;
    real r;
    logic [63:0] rb;
    logic xz, yz, xi, yi, xn, yn;
    it.xb = xb; it.yb = yb;
    it.ref_st = '0;
    xz = xb[62:52] == 0; yz = yb[62:52] == 0;
    xi = xb[62:52] == 11'h7ff && xb[51:0] == 0; yi = yb[62:52] == 11'h7ff && yb[51:0] == 0;
    xn = xb[62:52] == 11'h7ff && xb[51:0] != 0; yn = yb[62:52] == 11'h7ff && yb[51:0] != 0;
    if (xn || yn) begin
      rb = QNAN; it.ref_st.invalid = (xn && !xb[51]) || (yn && !yb[51]);
    end else if ((xi && yi) || (xz && yz)) begin
      rb = QNAN; it.ref_st.invalid = 1'b1;
    end else if (xi) begin
      rb = {xb[63] ^ yb[63], 11'h7ff, 52'h0};
    end else if (yz) begin
      rb = {xb[63] ^ yb[63], 11'h7ff, 52'h0}; it.ref_st.div_by_zero = 1'b1;
    end else if (xz || yi) begin
      rb = {xb[63] ^ yb[63], 63'h0};
    end else begin
      r  = $bitstoreal(xb) / $bitstoreal(yb);
      rb = $realtobits(r);
      if (rb[62:52] == 11'h7ff) it.ref_st.overflow = 1'b1;
      else if (rb[62:52] == 0) begin
        rb = {rb[63], 63'h0}; it.ref_st.underflow = 1'b1;
      end
    end
    it.ref_q = rb;
    return it;
  endfunction

  // operands change on the falling edge, half a clock before they are taken
  task automatic issue(input logic [63:0] xb, input logic [63:0] yb);
    @(negedge clk);
    x = xb; y = yb; in_valid = 1'b1;
    exp_q.push_back(reference(xb, yb));
  endtask

  task automatic maybe_bubble();
    if ($urandom_range(15) == 0) begin
      n_bubble++;
      repeat ($urandom_range(3) + 1) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end else n_b2b++;
  endtask

  // issue cycle of every operand pair the divider takes
  longint issue_cyc [$];

  // output checker; cycle counts rising edges
  always @(posedge clk) begin
    cycle++;
    if (!rst && in_valid) issue_cyc.push_back(cycle);
    if (!rst && out_valid) begin
      item_t it;
      longint d;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; if (failures <= 20) $display("unexpected result %h", q);
      end else begin
        it = exp_q.pop_front();
        it.cyc = issue_cyc.pop_front();
        // result must come LAT clocks after issue
        if (cycle - it.cyc != LAT) begin
          failures++;
          if (failures <= 20) $display("latency %0d, expected %0d", cycle - it.cyc, LAT);
        end
        if (it.ref_st != 0 || it.ref_q[62:52] == 11'h7ff || it.ref_q[62:0] == 0) begin
          if (q != it.ref_q || status != it.ref_st) begin
            failures++;
            if (failures <= 20) $display("special %h / %h: got %h st %b, expected %h st %b",
                     it.xb, it.yb, q, status, it.ref_q, it.ref_st);
          end
        end else begin
          d = longint'(q) - longint'(it.ref_q);
          if (d < 0) d = -d;
          if (q[63] != it.ref_q[63] || d > 2 || status != 0) begin
            failures++;
            if (failures <= 20) $display("%h / %h: got %h, expected %h (%0d ulp)", it.xb, it.yb, q, it.ref_q, d);
          end else begin
            n_ok++;
            if (d == 0) n_exact++;
            sum_ulp += d;
            if (int'(d) > max_ulp) max_ulp = int'(d);
          end
        end
        if (status.overflow)  n_ovf++;
        if (status.underflow) n_unf++;
        if (status.div_by_zero) n_dbz++;
        if (q[62:52] == 11'h7ff && q[51:0] != 0) n_nan++;
        if (q[62:0] == {11'h7ff, 52'h0}) n_inf++;
        if (q[62:0] == 0) n_zero++;
      end
    end
    // datapath events
    if (!rst && dut.m_valid && dut.d_spc == SPC_NONE) begin
      if (dut.m54[53])   n_carry++;
      if (dut.below_one) n_below++;
    end
    if (!rst && dut.g_m9.u_mant.vld[14] && dut.g_m9.u_mant.alpha60[43]) n_xbit++;
  end

  initial begin
    logic [63:0] a, b;
    x = '0; y = '0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // special operands
    issue(64'h7ff8_0000_0000_0000, 64'h3ff0_0000_0000_0000);   // qNaN / 1
    issue(64'h3ff0_0000_0000_0000, 64'h7ff0_0000_0000_0001);   // 1 / sNaN
    issue(64'h7ff0_0000_0000_0000, 64'hfff0_0000_0000_0000);   // inf / -inf
    issue(64'h0000_0000_0000_0000, 64'h8000_0000_0000_0000);   // 0 / -0
    issue(64'hfff0_0000_0000_0000, 64'h4000_0000_0000_0000);   // -inf / 2
    issue(64'h4008_0000_0000_0000, 64'h0000_0000_0000_0000);   // 3 / 0
    issue(64'h8000_0000_0000_0000, 64'h4008_0000_0000_0000);   // -0 / 3
    issue(64'h4008_0000_0000_0000, 64'h7ff0_0000_0000_0000);   // 3 / inf
    issue(64'h000f_ffff_ffff_ffff, 64'h3ff0_0000_0000_0000);   // subnormal / 1
    issue(64'h7fe0_0000_0000_0000, 64'h3c00_0000_0000_0000);   // overflow
    issue(64'h0010_0000_0000_0000, 64'h7fe0_0000_0000_0000);   // underflow
    issue(64'h4014_0000_0000_0000, 64'h4004_0000_0000_0000);   // 5 / 2.5
    // directed mantissa cases
    for (int i = 0; i < 200; i++) begin
      a = rnd_normal(1000, 1046);
      issue(a, {1'($urandom), 11'(1000 + $urandom_range(40)), a[51:0]});     // equal mantissas
      b = rnd_normal(1000, 1046); b[43:0] = '1;                              // largest a2 (m=9)
      issue(rnd_normal(1000, 1046), b);
      b = rnd_normal(1000, 1046); b[51:0] = '0;                              // mantissa 1.0
      issue(rnd_normal(1000, 1046), b);
      b[51:0] = {8'h00, 44'hfff_ffff_ffff};                                  // a1 = 1, a2 max
      issue({1'b0, 11'h3ff, 52'hf_ffff_ffff_ffff}, b);
      maybe_bubble();
    end
    // random operands: three in four with quotients well inside the normal
    // range, the rest over all normal exponents
    for (int i = 0; i < NRAND; i++) begin
      if (i % 4 != 3) issue(rnd_normal(523, 1523), rnd_normal(523, 1523));
      else            issue(rnd_normal(1, 2046), rnd_normal(1, 2046));
      maybe_bubble();
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++; $display("%0d results missing", exp_q.size());
    end
    $display("results ok=%0d exact=%0d max_ulp=%0d mean_ulp=%f", n_ok, n_exact, max_ulp,
             real'(sum_ulp) / real'(n_ok));
    $display("events nan=%0d inf=%0d zero=%0d div0=%0d ovf=%0d unf=%0d carry=%0d below1=%0d xbit=%0d bubble=%0d b2b=%0d",
             n_nan, n_inf, n_zero, n_dbz, n_ovf, n_unf, n_carry, n_below, n_xbit, n_bubble, n_b2b);
    if (n_nan == 0 || n_inf == 0 || n_zero == 0 || n_dbz == 0 || n_ovf == 0 || n_unf == 0 ||
        n_carry == 0 || n_below == 0 || n_xbit == 0 || n_bubble == 0 || n_b2b == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
