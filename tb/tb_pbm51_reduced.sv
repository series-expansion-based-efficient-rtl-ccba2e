// tb_pbm51_reduced: checks the reduced 51-bit multiplier in both forms.
// Operand a has the form the datapath guarantees (1.<15 zeros>X... for
// M = 9, 1.<16 zeros>... for M = 13); the reference is the exact product
// minus the dropped low block products, as for pbm51. One pair per clock,
// results 5 clocks later.
`timescale 1ns/1ps
module tb_pbm51_reduced;
  localparam int LAT = 5, N = 5000;
  logic clk = 1'b0;
  logic [50:0] a9, a13, b;
  logic [101:0] p9, p13;
  pbm51_reduced #(.M(9))  u9  (.clk, .a(a9),  .b, .p(p9));
  pbm51_reduced #(.M(13)) u13 (.clk, .a(a13), .b, .p(p13));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [101:0] e9_q [$], e13_q [$];

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
    logic [50:0] r9, r13, rb;
    for (int i = 0; i < N + LAT - 1; i++) begin
      if (i < N) begin
        r9  = {1'b1, 15'b0, 3'($urandom), 32'($urandom)};
        r13 = {1'b1, 16'b0, 2'($urandom), 32'($urandom)};
        rb  = {19'($urandom), 32'($urandom)};
        if (i == 0) begin r9 = {1'b1, 15'b0, 35'h7_ffff_ffff}; r13 = {1'b1, 16'b0, 34'h3_ffff_ffff}; rb = '1; end
        a9 <= r9; a13 <= r13; b <= rb;
        e9_q.push_back(ref_p(r9, rb));
        e13_q.push_back(ref_p(r13, rb));
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        logic [101:0] e9, e13;
        e9 = e9_q.pop_front();
        e13 = e13_q.pop_front();
        checks += 2;
        if (p9 !== e9)   begin failures++; if (failures < 5) $display("M=9 got %h expected %h", p9, e9); end
        if (p13 !== e13) begin failures++; if (failures < 5) $display("M=13 got %h expected %h", p13, e13); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
