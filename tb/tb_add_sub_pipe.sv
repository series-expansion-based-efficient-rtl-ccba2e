// tb_add_sub_pipe: checks the two-stage 60-bit adder and subtractor with
// random operands, operands that carry across the split point, and
// all-ones; one pair per clock, each result 2 clocks later, modulo 2^60.
`timescale 1ns/1ps
module tb_add_sub_pipe;
  localparam int LAT = 2, N = 5000;
  logic clk = 1'b0;
  logic [59:0] a, b, s_add, s_sub;
  add_sub_pipe #(.W(60), .SUB(1'b0)) u_add (.clk, .a, .b, .s(s_add));
  add_sub_pipe #(.W(60), .SUB(1'b1)) u_sub (.clk, .a, .b, .s(s_sub));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [59:0] ea_q [$], es_q [$];

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [59:0] ra, rb;
    for (int i = 0; i < N + LAT - 1; i++) begin
      if (i < N) begin
        ra = {28'($urandom), 32'($urandom)};
        rb = {28'($urandom), 32'($urandom)};
        if (i == 0) begin ra = 60'h3fffffff; rb = 60'h1; end         // carry into the high half
        if (i == 1) begin ra = 60'h40000000; rb = 60'h1; end         // borrow from the high half
        if (i == 2) begin ra = '1; rb = '1; end
        a <= ra; b <= rb;
        ea_q.push_back(ra + rb);
        es_q.push_back(ra - rb);
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        logic [59:0] ea, es;
        ea = ea_q.pop_front();
        es = es_q.pop_front();
        checks += 2;
        if (s_add !== ea) begin failures++; if (failures < 5) $display("add got %h expected %h", s_add, ea); end
        if (s_sub !== es) begin failures++; if (failures < 5) $display("sub got %h expected %h", s_sub, es); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
