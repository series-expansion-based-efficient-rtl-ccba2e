// tb_pbm51: checks the 51-bit partial block multiplier against the exact
// product minus the three dropped block products, computed here from the
// whole 102-bit product: ref = a*b - (aL*bL + ((aL*bM + aM*bL) << 17)).
// Operands are random, all-ones and single blocks; a new pair enters each
// clock and each result must appear 5 clocks later. The dropped part is
// also checked to stay below 2^52.
`timescale 1ns/1ps
module tb_pbm51;
  localparam int LAT = 5, N = 5000;
  logic clk = 1'b0;
  logic [50:0] a, b;
  logic [101:0] p;
  pbm51 dut (.clk, .a, .b, .p);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [101:0] exp_p [$];

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [101:0] ref_p(input logic [50:0] x, input logic [50:0] y);
    logic [101:0] full, drop;
    full = 102'(x) * 102'(y);
    drop = 102'(x[16:0]) * 102'(y[16:0])
         + ((102'(x[16:0]) * 102'(y[33:17]) + 102'(x[33:17]) * 102'(y[16:0])) << 17);
    return full - drop;
  endfunction

  initial begin
    logic [50:0] ra, rb;
    for (int i = 0; i < N + LAT - 1; i++) begin
      if (i < N) begin
        ra = {19'($urandom), 32'($urandom)};
        rb = {19'($urandom), 32'($urandom)};
        if (i == 0) begin ra = '1; rb = '1; end
        if (i == 1) begin ra = 51'h1ffff << 34; rb = 51'h1ffff; end
        a <= ra; b <= rb;
        exp_p.push_back(ref_p(ra, rb));
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        logic [101:0] e;
        e = exp_p.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 5) $display("got %h expected %h", p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
