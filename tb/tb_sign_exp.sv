// tb_sign_exp: checks sign XOR and the temporary exponent Ex - Ey (13-bit
// signed) for random and extreme exponents, and that both come out after
// the configured delay (LAT = 4 here, 27 by default).
`timescale 1ns/1ps
module tb_sign_exp;
  localparam int LAT = 4, N = 2000;
  logic clk = 1'b0;
  logic sx, sy, sign;
  logic [10:0] ex, ey;
  logic signed [12:0] exp_tmp;
  sign_exp #(.LAT(LAT)) dut (.clk, .sx, .sy, .ex, .ey, .sign, .exp_tmp);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int e_q [$];
  logic s_q [$];

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rsx, rsy;
    int rex, rey;
    for (int i = 0; i < N + LAT - 1; i++) begin
      if (i < N) begin
        rsx = 1'($urandom); rsy = 1'($urandom);
        rex = $urandom_range(2047); rey = $urandom_range(2047);
        if (i == 0) begin rex = 2047; rey = 0; end
        if (i == 1) begin rex = 0; rey = 2047; end
        sx <= rsx; sy <= rsy; ex <= 11'(rex); ey <= 11'(rey);
        e_q.push_back(rex - rey);
        s_q.push_back(rsx ^ rsy);
      end
      @(posedge clk);
      #1;
      if (i >= LAT - 1) begin
        int e;
        logic s;
        e = e_q.pop_front();
        s = s_q.pop_front();
        checks++;
        if (int'(exp_tmp) != e || sign != s) begin
          failures++;
          if (failures < 5) $display("got %0d/%b expected %0d/%b", exp_tmp, sign, e, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
