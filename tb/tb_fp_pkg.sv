// tb_fp_pkg: helpers shared by the testbenches of the exp core.
//
// Converts IEEE 754 single bit patterns to real numbers by plain arithmetic
// (mantissa times a power of two), independently of the conversion logic
// under test, and measures the distance between two values in units in the
// last place (ulp) of a single-precision result.
package tb_fp_pkg;

  function automatic real pow2(input int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int k = 0; k < e; k++) r = r * 2.0;
    else        for (int k = 0; k < -e; k++) r = r / 2.0;
    return r;
  endfunction

  function automatic bit is_nan(input logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] != 0;
  endfunction

  function automatic bit is_inf(input logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] == 0;
  endfunction

  // Value of a finite float (normal or subnormal).
  function automatic real f2r(input logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 0) begin
      m = real'(f[22:0]);
      e = -126 - 23;
    end else begin
      m = real'({1'b1, f[22:0]});
      e = int'(f[30:23]) - 127 - 23;
    end
    return (f[31] ? -m : m) * pow2(e);
  endfunction

  // Weight of the last mantissa bit of a finite float.
  function automatic real ulp_of(input logic [31:0] f);
    if (f[30:23] == 0) return pow2(-149);
    return pow2(int'(f[30:23]) - 127 - 23);
  endfunction

  // |dut - ref| in ulps of dut.
  function automatic real ulp_err(input logic [31:0] dut, input real ref_v);
    real d;
    d = f2r(dut) - ref_v;
    if (d < 0.0) d = -d;
    return d / ulp_of(dut);
  endfunction

  // A float from sign, unbiased exponent and 23 mantissa bits.
  function automatic logic [31:0] mkf(input bit s, input int e, input logic [22:0] m);
    return {s, 8'(e + 127), m};
  endfunction

endpackage
