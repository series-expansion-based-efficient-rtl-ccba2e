// tb_sq34: checks the 34-bit full squarer against the exact square of
// random, all-ones and single-block operands; one operand per clock, each
// result 3 clocks later.
`timescale 1ns/1ps
module tb_sq34;
  localparam int LAT = 3, N = 5000;
  logic clk = 1'b0;
  logic [33:0] a;
  logic [67:0] p;
  sq34 dut (.clk, .a, .p);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [67:0] exp_p [$];

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [33:0] ra;
    for (int i = 0; i < N + LAT - 1; i++) begin
      if (i < N) begin
        ra = {2'($urandom), 32'($urandom)};
        if (i == 0) ra = '1;
        if (i == 1) ra = 34'h1ffff;
        if (i == 2) ra = 34'h1ffff << 17;
        a <= ra;
        exp_p.push_back(68'(ra) * 68'(ra));
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        logic [67:0] e;
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
