// exp_bits_extract: splits a single-precision argument x into x = i + f.
//
// The float is converted to an 8.24 two's-complement fixed-point number;
// its top 8 bits are the signed integer part i = floor(x) and its low 24
// bits the fraction f in [0, 1). The fraction is then widened to the 2.30
// format of the CORDIC (two integer bits, both zero, and 30 fraction bits,
// the low 6 of them zero). The split into an 8-bit integer part and a
// 24-bit fraction and the 2.30 widening follow the published design; the
// handling of the cases below is this design's own:
//   * fraction bits finer than 2^-24 (|x| < 2^-1 or so) are truncated
//     toward zero in magnitude before the sign is applied;
//   * |x| >= 128 and +/-inf saturate: positive to i = 127 (whose table entry
//     is +inf), negative to i = -128, f = 0 (whose table entry is 0);
//   * subnormal x is taken as 0;
//   * a NaN argument raises nan, which the core turns into a NaN result.
//
// Interface: one argument per cycle when in_valid is high; the outputs are
// registered, so they appear one cycle later with out_valid. No stall.
module exp_bits_extract
  import exp_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  float_t           x,
  output logic             out_valid,
  output logic signed [7:0] i_part,   // floor(x), saturated to [-128, 127]
  output logic [FIX_W-1:0] f_part,    // x - floor(x), unsigned 2.30
  output logic             nan        // x is a NaN
);

  logic [23:0]      sig;
  logic [31:0]      mag;
  logic [31:0]      fixed;   // 8.24 two's complement
  logic             big;
  logic             is_nan;

  always_comb begin
    sig    = {1'b1, x.man};
    is_nan = (x.exp == 8'hFF) && (x.man != '0);
    big    = (x.exp >= 8'd134);          // |x| >= 2^7
    mag    = '0;
    if (x.exp == 8'd0) begin
      mag = '0;                          // zero and subnormals
    end else if (x.exp >= 8'd126) begin
      mag = {8'd0, sig} << (x.exp - 8'd126);  // exact, shift 0..7
    end else if (x.exp > 8'd102) begin
      mag = {8'd0, sig} >> (8'd126 - x.exp);  // shift 1..23, truncates
    end
    if (big)
      fixed = x.sign ? 32'h8000_0000 : 32'h7FFF_FFFF;
    else
      fixed = x.sign ? (~mag + 32'd1) : mag;
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    i_part <= fixed[31:24];
    f_part <= {2'b00, fixed[23:0], 6'b0};
    nan    <= is_nan;
  end

endmodule
