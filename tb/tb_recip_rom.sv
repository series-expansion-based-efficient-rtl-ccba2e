// tb_recip_rom: reads every word of both table sizes (256 and 4096 words)
// and checks it: for a1 = 1 + i*2^-k the word w must satisfy
// |w * a1 - 2^53| <= a1 / 2 in units of 2^-k (round to nearest), except
// word 0, which must be all ones. The read latency of 1 clock is checked by
// comparing with the address presented one clock earlier.
`timescale 1ns/1ps
module tb_recip_rom;
  logic clk = 1'b0;
  logic [7:0]  addr8;
  logic [11:0] addr12;
  logic [52:0] d8, d12;
  recip_rom #(.ADDR_W(8))  u8  (.clk, .addr(addr8),  .data(d8));
  recip_rom #(.ADDR_W(12)) u12 (.clk, .addr(addr12), .data(d12));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check word w of the table with k address bits at index i
  task automatic check(input int k, input int i, input logic [52:0] w);
    logic [127:0] a1, prod, target, diff;
    checks++;
    if (i == 0) begin
      if (w !== '1) begin failures++; $display("k=%0d word 0 = %h", k, w); end
      return;
    end
    a1     = (128'(1) << k) + 128'(i);
    prod   = 128'(w) * a1;
    target = 128'(1) << (53 + k);
    diff   = prod > target ? prod - target : target - prod;
    if (2 * diff > a1) begin
      failures++;
      if (failures < 5) $display("k=%0d word %0d = %h is not round(2^53/a1)", k, i, w);
    end
  endtask

  initial begin
    for (int i = 0; i <= 4096; i++) begin
      addr8  <= 8'(i % 256);
      addr12 <= 12'(i);
      @(posedge clk);
      #1;
      // after this edge the word of address i is on the outputs
      if (i < 256)  check(8, i, d8);
      if (i < 4096) check(12, i, d12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
