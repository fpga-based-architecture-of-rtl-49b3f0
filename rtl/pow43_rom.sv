// pow43_rom: the requantizer's "table look up" block, a 1024-entry ROM of
// x^(4/3) for x = 0..1023, unsigned with FRAC_BITS fractional bits and one
// cycle of read latency (block RAM style).  Inputs of 1024 and above are
// handled by the requantizer, which divides by 8 before the look-up and
// multiplies the result by 16, as the document describes.  The contents are
// computed at elaboration from the formula; the 24-bit width and 10
// fractional bits are this design's choice.
module pow43_rom #(
  parameter int DEPTH     = 1024,
  parameter int W         = 24,
  parameter int FRAC_BITS = 10
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [W-1:0]             data
);
  typedef logic [W-1:0] rom_t [DEPTH];

  function automatic rom_t make_rom();
    rom_t r;
    for (int x = 0; x < DEPTH; x++)
      r[x] = W'($rtoi($pow(real'(x), 4.0 / 3.0) * (2.0 ** FRAC_BITS) + 0.5));
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  always_ff @(posedge clk) data <= ROM[addr];
endmodule
