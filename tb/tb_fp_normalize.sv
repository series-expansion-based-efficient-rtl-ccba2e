// tb_fp_normalize: checks the output stage: exponent biasing and its
// adjustment for a quotient below one and for a rounding carry, the
// fraction after the carry shift, overflow to infinity, underflow to zero,
// and the override by each special class. Expected words are assembled
// here from the IEEE-754 field layout. Output registered (1 clock).
`timescale 1ns/1ps
module tb_fp_normalize;
  import fpdiv_pkg::*;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic sign, below_one, invalid, div_by_zero, out_valid;
  logic signed [12:0] exp_tmp;
  logic [53:0] m54;
  special_e special;
  fp64_t q;
  status_t status;
  fp_normalize dut (.clk, .rst, .in_valid, .sign, .exp_tmp, .m54, .below_one, .special,
                    .invalid, .div_by_zero, .out_valid, .q, .status);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0, n_carry = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic s, input int et, input logic [53:0] m, input logic b1,
                       input special_e sp, input logic [63:0] e_q, input logic [3:0] e_st);
    @(negedge clk);
    sign = s; exp_tmp = 13'(et); m54 = m; below_one = b1; special = sp;
    invalid = e_st[3]; div_by_zero = e_st[2]; in_valid = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (q !== e_q || status !== e_st || !out_valid) begin
      failures++;
      if (failures < 8) $display("et=%0d m=%h b1=%b sp=%0d: got %h %b expected %h %b",
                                 et, m, b1, sp, q, status, e_q, e_st);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      logic s, b1, c;
      int et, e;
      logic [51:0] f;
      logic [53:0] m;
      s  = 1'($urandom);
      b1 = 1'($urandom);
      c  = ($urandom_range(9) == 0);
      et = int'($urandom_range(2200)) - 1100;
      f  = {20'($urandom), 32'($urandom)};
      m  = c ? {2'b10, 52'h0} : {2'b01, f};
      e  = et + 1023 - int'(b1) + int'(c);
      if (c) begin f = '0; n_carry++; end
      if (e >= 2047)   begin apply(s, et, m, b1, SPC_NONE, {s, 11'h7ff, 52'h0}, 4'b0010); n_ovf++; end
      else if (e <= 0) begin apply(s, et, m, b1, SPC_NONE, {s, 63'h0}, 4'b0001); n_unf++; end
      else             apply(s, et, m, b1, SPC_NONE, {s, 11'(e), f}, 4'b0000);
    end
    // specials override the datapath whatever its value
    apply(1'b1, 5, 54'h1, 1'b0, SPC_NAN,  64'h7ff8_0000_0000_0000, 4'b1000);
    apply(1'b1, 5, 54'h1, 1'b0, SPC_INF,  64'hfff0_0000_0000_0000, 4'b0100);
    apply(1'b0, 5, 54'h1, 1'b0, SPC_INF,  64'h7ff0_0000_0000_0000, 4'b0000);
    apply(1'b1, 5, 54'h1, 1'b0, SPC_ZERO, 64'h8000_0000_0000_0000, 4'b0000);
    if (n_ovf == 0 || n_unf == 0 || n_carry == 0) begin failures++; $display("case not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
