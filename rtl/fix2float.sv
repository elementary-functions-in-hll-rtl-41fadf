// fix2float: casts an unsigned 2.30 fixed-point number to IEEE 754 single.
//
// The word is normalised with a leading-zero count so that its leading one
// sits in bit 31; bits 30..8 become the mantissa, bit 7 the guard bit and
// bits 6..0 the sticky bits, and the mantissa is rounded to nearest, ties to
// even. Bit 31 of the input has weight 2, so a leading one found after n
// zeros gives the biased exponent 128 - n. Zero converts to +0. Every 2.30
// value is a normal float, so no overflow or subnormal case arises.
//
// In the core it turns the CORDIC result exp(f) into a float, as in the
// published design; the rounding mode and the one-cycle registered timing
// are this design's choices.
module fix2float
  import exp_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [FIX_W-1:0] a,       // unsigned 2.30
  output logic             out_valid,
  output float_t           y
);

  logic [5:0]  lz;
  logic [31:0] norm;
  logic        rnd;
  logic [24:0] man_r;   // {carry, hidden one, 23 mantissa bits} after rounding
  float_t      res;

  always_comb begin
    lz    = lzc32(a);
    norm  = a << lz;
    rnd   = norm[7] && ((|norm[6:0]) || norm[8]);
    man_r = {1'b0, norm[31:8]} + 25'(rnd);
    res.sign = 1'b0;
    if (a == '0) begin
      res.exp = '0;
      res.man = '0;
    end else if (man_r[24]) begin      // rounding carried out: 10.000...
      res.exp = 8'(129 - lz);
      res.man = '0;
    end else begin
      res.exp = 8'(128 - lz);
      res.man = man_r[22:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    y <= res;
  end

endmodule
