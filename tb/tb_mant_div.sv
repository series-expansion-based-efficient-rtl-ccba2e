// tb_mant_div: tests both mantissa datapaths, mant_div_m9 and mant_div_m13,
// side by side. Random mantissas x = 1.f and y = 1.g stream in at one pair
// per clock; the reference quotient is the exact integer division
// floor(X * 2^59 / Y) of the 53-bit mantissa integers, in the datapaths'
// 1.59 output format. Each result must arrive after the datapath's latency
// (27 and 24 clocks) and lie less than 2 ulp from the exact quotient, ulp
// being that of the quotient's binade (2^-52 for q >= 1, 2^-53 below).
// Rounding both this value and the exact quotient to 53 bits adds at most
// 0.5 ulp each, so the rounded results then differ by at most 2 ulp. Directed divisors cover the saturated table word (y = 1.0)
// and the largest a2 of each split.
`timescale 1ns/1ps
module tb_mant_div;
  localparam int N    = 20000;
  localparam int TOL  = 255;

  logic        clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [52:0] x;
  logic [51:0] yf;
  logic        v9, v13;
  logic [59:0] q9, q13;

  mant_div_m9  u9  (.clk, .rst, .in_valid, .x, .yf, .out_valid(v9),  .q(q9));
  mant_div_m13 u13 (.clk, .rst, .in_valid, .x, .yf, .out_valid(v13), .q(q13));

  always #5 clk = ~clk;

  typedef struct { logic [59:0] exact; longint cyc; } item_t;
  item_t q9_exp [$], q13_exp [$];
  int checks = 0, failures = 0, max9 = 0, max13 = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (N + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [59:0] exact_q(input logic [52:0] xa, input logic [51:0] yb);
    logic [127:0] num, den;
    num = 128'(xa) << 59;
    den = 128'({1'b1, yb});
    return 60'(num / den);
  endfunction

  task automatic check(input string nm, input logic [59:0] got, input item_t it,
                       input int lat, inout int mx);
    longint d;
    checks++;
    d = longint'(got) - longint'(it.exact);
    if (d < 0) d = -d;
    // error in units of 2^-59 scaled to the quotient's binade: below one
    // the ulp is half as large, so the error counts double
    if (!it.exact[59]) d = 2 * d;
    if (int'(d) > mx) mx = int'(d);
    if (d > TOL || cycle - it.cyc != lat + 1) begin
      failures++;
      if (failures < 10)
        $display("%s: got %h exact %h (diff %0d) latency %0d", nm, got, it.exact, d, cycle - it.cyc - 1);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && v9) begin
      if (q9_exp.size() == 0) begin failures++; $display("m9: extra result"); end
      else check("m9", q9, q9_exp.pop_front(), 27, max9);
    end
    if (!rst && v13) begin
      if (q13_exp.size() == 0) begin failures++; $display("m13: extra result"); end
      else check("m13", q13, q13_exp.pop_front(), 24, max13);
    end
  end

  initial begin
    item_t it;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      logic [52:0] xa;
      logic [51:0] yb;
      xa = {1'b1, 20'($urandom), 32'($urandom)};
      yb = {20'($urandom), 32'($urandom)};
      case (i % 8)
        0: yb = '0;                         // table word 0, saturated
        1: yb[43:0] = '1;                   // largest a2, m = 9
        2: yb[39:0] = '1;                   // largest a2, m = 13
        3: xa = {1'b1, yb};                 // x = y
        default: ;
      endcase
      x <= xa; yf <= yb; in_valid <= 1'b1;
      @(posedge clk);
      it.exact = exact_q(xa, yb);
      it.cyc   = cycle - 1;
      q9_exp.push_back(it);
      q13_exp.push_back(it);
    end
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    if (q9_exp.size() != 0 || q13_exp.size() != 0) begin
      failures++; $display("results missing");
    end
    $display("max error m9=%0d m13=%0d units of 2^-59", max9, max13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
