// tb_fp_preproc: checks unpacking and the exception class for every pair
// of operand kinds (qNaN, sNaN, +-inf, +-0, subnormal, normal), against a
// table of expected classes and flags written out here case by case, and
// the unpacked fields for random normal operands. Outputs are registered,
// so each check looks one clock after the operands.
`timescale 1ns/1ps
module tb_fp_preproc;
  import fpdiv_pkg::*;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  fp64_t x, y;
  logic out_valid, sx, sy, invalid, div_by_zero;
  logic [10:0] ex, ey;
  logic [52:0] mx, my;
  special_e special;
  fp_preproc dut (.clk, .rst, .in_valid, .x, .y, .out_valid, .sx, .sy, .ex, .ey,
                  .mx, .my, .special, .invalid, .div_by_zero);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operand kinds: 0 qNaN, 1 sNaN, 2 inf, 3 zero, 4 subnormal, 5 normal
  function automatic fp64_t kind(input int k, input logic s);
    case (k)
      0: return '{sign: s, exp: '1, frac: 52'h8_0000_0000_0001};
      1: return '{sign: s, exp: '1, frac: 52'h0_0000_0000_0001};
      2: return '{sign: s, exp: '1, frac: '0};
      3: return '{sign: s, exp: '0, frac: '0};
      4: return '{sign: s, exp: '0, frac: 52'h1_2345_6789_abcd};
      default: return '{sign: s, exp: 11'h400, frac: 52'h9_8765_4321_0fed};
    endcase
  endfunction

  // expected class, invalid and div_by_zero for dividend kind i, divisor kind j
  function automatic logic [3:0] expect_cls(input int i, input int j);
    logic xz, yz;
    xz = (i == 3 || i == 4);
    yz = (j == 3 || j == 4);
    if (i <= 1 || j <= 1) return {SPC_NAN, 1'(i == 1 || j == 1), 1'b0};
    if (i == 2 && j == 2) return {SPC_NAN, 2'b10};
    if (xz && yz)         return {SPC_NAN, 2'b10};
    if (i == 2)           return {SPC_INF, 2'b00};
    if (yz)               return {SPC_INF, 2'b01};
    if (xz || j == 2)     return {SPC_ZERO, 2'b00};
    return {SPC_NONE, 2'b00};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) begin
        logic [3:0] e;
        @(negedge clk);
        x = kind(i, 1'($urandom)); y = kind(j, 1'($urandom)); in_valid = 1'b1;
        @(posedge clk); #1;
        e = expect_cls(i, j);
        checks++;
        if ({special, invalid, div_by_zero} !== e || !out_valid) begin
          failures++;
          $display("kinds %0d/%0d: got %b%b%b expected %b", i, j, special, invalid, div_by_zero, e);
        end
      end
    for (int n = 0; n < 1000; n++) begin
      fp64_t rx, ry;
      @(negedge clk);
      rx = '{sign: 1'($urandom), exp: 11'($urandom_range(2046, 1)), frac: {20'($urandom), 32'($urandom)}};
      ry = '{sign: 1'($urandom), exp: 11'($urandom_range(2046, 1)), frac: {20'($urandom), 32'($urandom)}};
      x = rx; y = ry; in_valid = 1'($urandom);
      @(posedge clk); #1;
      checks++;
      if (sx !== rx.sign || sy !== ry.sign || ex !== rx.exp || ey !== ry.exp ||
          mx !== {1'b1, rx.frac} || my !== {1'b1, ry.frac} || special !== SPC_NONE ||
          invalid || div_by_zero || out_valid !== in_valid) begin
        failures++;
        if (failures < 5) $display("unpack %h %h wrong", rx, ry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
