// tb_pbm53: checks the 53-bit partial block multiplier against the exact
// 106-bit product minus the three dropped 17x17 block products of the low
// blocks, ref = a*b - (aL*bL + ((aL*bM + aM*bL) << 17)), computed from the
// whole product. Random, all-ones and single-block operands enter one pair
// per clock; each result must appear 5 clocks after its operands. The
// dropped part is also checked to stay below 2^52.
`timescale 1ns/1ps
module tb_pbm53;
  localparam int LAT = 5, N = 5000;
  logic clk = 1'b0;
  logic [52:0] a, b;
  logic [105:0] p;
  pbm53 dut (.clk, .a, .b, .p);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [105:0] exp_p [$];

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [105:0] ref_p(input logic [52:0] x, input logic [52:0] y);
    logic [105:0] full, drop;
    full = 106'(x) * 106'(y);
    drop = 106'(x[16:0]) * 106'(y[16:0])
         + ((106'(x[16:0]) * 106'(y[33:17]) + 106'(x[33:17]) * 106'(y[16:0])) << 17);
    if (drop >= (106'(1) << 52)) begin
      failures++; $display("dropped part too large");
    end
    return full - drop;
  endfunction

  initial begin
    logic [52:0] ra, rb;
    for (int i = 0; i < N + LAT - 1; i++) begin
      if (i < N) begin
        ra = {21'($urandom), 32'($urandom)};
        rb = {21'($urandom), 32'($urandom)};
        if (i == 0) begin ra = '1; rb = '1; end
        if (i == 1) begin ra = 53'h3 << 51; rb = 53'h1ffff; end
        if (i == 2) begin ra = 53'h1ffff << 34; rb = 53'h3 << 51; end
        a <= ra; b <= rb;
        exp_p.push_back(ref_p(ra, rb));
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        logic [105:0] e;
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
