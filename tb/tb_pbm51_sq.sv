// tb_pbm51_sq: checks the 51-bit partial block squarer against the exact
// square minus the dropped low block products,
// ref = a*a - (aL*aL + ((2*aL*aM) << 17)), and against pbm51 fed with the
// same operand twice, which must agree bit for bit. One operand per clock;
// results 4 clocks later.
`timescale 1ns/1ps
module tb_pbm51_sq;
  localparam int LAT = 4, N = 5000;
  logic clk = 1'b0;
  logic [50:0] a;
  logic [101:0] p, p_mul;
  pbm51_sq dut (.clk, .a, .p);
  pbm51    u_mul (.clk, .a, .b(a), .p(p_mul));   // latency 5, compared one clock later
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [101:0] exp_p [$];
  logic [101:0] last_p;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [101:0] ref_p(input logic [50:0] x);
    return 102'(x) * 102'(x)
         - (102'(x[16:0]) * 102'(x[16:0]) + ((2 * 102'(x[16:0]) * 102'(x[33:17])) << 17));
  endfunction

  initial begin
    logic [50:0] ra;
    for (int i = 0; i < N + LAT; i++) begin
      if (i < N) begin
        ra = {19'($urandom), 32'($urandom)};
        if (i == 0) ra = '1;
        if (i == 1) ra = 51'h1ffff << 34;
        a <= ra;
        exp_p.push_back(ref_p(ra));
      end
      @(posedge clk);
      #1;
      if (i >= LAT) begin
        checks++;
        if (p_mul !== last_p) begin
          failures++;
          if (failures < 5) $display("pbm51 gives %h, squarer gave %h", p_mul, last_p);
        end
      end
      if (i >= LAT - 1 && i < N + LAT - 1) begin
        logic [101:0] e;
        e = exp_p.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 5) $display("got %h expected %h", p, e);
        end
      end
      last_p = p;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
