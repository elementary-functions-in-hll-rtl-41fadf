// exp_int_table: precomputed exp(i) for every 8-bit signed integer i.
//
// A 256 x 32 read-only memory addressed by i in two's complement (address
// 0..127 holds i = 0..127, address 128..255 holds i = -128..-1). Entry i is
// exp(i) rounded to the nearest IEEE 754 single: +inf for i >= 89, subnormal
// numbers for -103 <= i <= -88 and +0 for i <= -104. The contents are
// computed at elaboration by exp_pkg::exp_int_entry, so no data file is
// needed and synthesis sees the constants.
//
// Keeping exp of the integer part in an on-chip table follows the published
// design; the synchronous read (one cycle of latency, so that the table maps
// onto a block RAM) is this design's choice.
module exp_int_table
  import exp_pkg::*;
(
  input  logic             clk,
  input  logic signed [7:0] addr,   // integer part i
  output float_t           data     // exp(i), valid one cycle after addr
);

  typedef logic [31:0] rom_t [256];

  function automatic rom_t build_rom();
    rom_t t;
    for (int a = 0; a < 256; a++)
      t[a] = exp_int_entry((a < 128) ? a : a - 256);
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk)
    data <= ROM[$unsigned(addr)];

endmodule
