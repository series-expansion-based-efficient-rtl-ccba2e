// recip_rom: the initial look-up table of the divider (the BRAM of stage 1).
// Word i holds the reciprocal of a1 = 1 + i * 2^-ADDR_W, that is of the
// divisor mantissa's leading ADDR_W+1 bits with the hidden bit, as a pure
// fraction of DATA_W = 53 bits: word = round(2^(53+ADDR_W) / (2^ADDR_W + i)).
// Word 0 (a1 = 1) would be exactly 1.0, which the 0.53 format cannot hold;
// it is stored as 2^53 - 1 (all ones), this design's choice.
// The table is filled at elaboration from that formula, so it maps to a
// block RAM initialised as a ROM. Read timing: the address is registered
// into the word on the next rising clock edge (latency 1).
// ADDR_W = 8 (256 words) serves the m = 9 divider, 12 (4k words) the m = 13.
module recip_rom #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 53
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      logic [127:0] num, den, quo;
      den = 128'(DEPTH) + 128'(i);
      num = 128'(1) << (DATA_W + ADDR_W);
      quo = (num + (den >> 1)) / den;              // round to nearest
      if (quo >= (128'(1) << DATA_W)) quo = (128'(1) << DATA_W) - 1;
      mem[i] = quo[DATA_W-1:0];
    end
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
