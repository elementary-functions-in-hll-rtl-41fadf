// exp_pkg: types and constants shared by the exp(x) core.
//
// The core computes exp(x) for an IEEE 754 single-precision x by writing
// x = i + f (i an 8-bit signed integer, 0 <= f < 1), reading exp(i) from a
// table and computing exp(f) with a hyperbolic CORDIC. This package holds
// the float layout, the fixed-point formats, the CORDIC shift schedule and
// its arctanh table (htab), and the pipeline latencies the modules agree on.
//
// Fixed-point formats:
//   * the argument is first brought to 8.24 two's complement (8 integer
//     bits, 24 fraction bits), as the split into an 8-bit integer part and a
//     24-bit fraction implies;
//   * the CORDIC works on 2.30 numbers (2 integer bits, 30 fraction bits),
//     signed for x, y and z; its result exp(f) in [1, e) is read unsigned.
//
// CORDIC schedule (this design's choice, following the classic hyperbolic
// CORDIC): iteration k uses shift s(k) = 1, 2, 3, 4, 4, 5, ..., 13, 13, 14,
// ..., 30, i.e. shifts 1..30 with 4 and 13 repeated for convergence, which
// is exactly 32 iterations. Shifts past 30 would shift a 2.30 word to zero.
package exp_pkg;

  // IEEE 754 single precision.
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } float_t;

  localparam int unsigned FIX_W  = 32;  // CORDIC word width

  localparam int unsigned ITER_DEFAULT = 32;
  localparam int unsigned ITER_MAX     = 32;

  localparam float_t FLOAT_QNAN = '{sign: 1'b0, exp: 8'hFF, man: 23'h400000};

  // Shift amount of CORDIC iteration k (0-based).
  function automatic int unsigned cordic_shift(input int unsigned k);
    if (k < 4)       return k + 1;
    else if (k < 14) return k;
    else             return k - 1;
  endfunction

  // htab[k] = round(atanh(2^-s(k)) * 2^30), s(k) as above.
  localparam logic [FIX_W-1:0] HTAB [ITER_MAX] = '{
    32'h2327d4f5, 32'h1058aefb, 32'h080ac48e, 32'h04015623,
    32'h04015623, 32'h02002ab1, 32'h01000556, 32'h008000ab,
    32'h00400015, 32'h00200003, 32'h00100000, 32'h00080000,
    32'h00040000, 32'h00020000, 32'h00020000, 32'h00010000,
    32'h00008000, 32'h00004000, 32'h00002000, 32'h00001000,
    32'h00000800, 32'h00000400, 32'h00000200, 32'h00000100,
    32'h00000080, 32'h00000040, 32'h00000020, 32'h00000010,
    32'h00000008, 32'h00000004, 32'h00000002, 32'h00000001
  };

  // Start value of the CORDIC x register: round(2^30 / K), where
  // K = prod_k sqrt(1 - 2^(-2 s(k))) over the 32 iterations (1/K = 1.2074970678).
  // Starting at x = 1/K, y = 0 makes the rotations end at x = cosh(f),
  // y = sinh(f), so exp(f) = x + y.
  localparam logic [FIX_W-1:0] CORDIC_X0 = 32'h4d47a1c8;

  // Pipeline depths (cycles from an input register to the output register).
  localparam int unsigned LAT_EXTRACT = 1;
  localparam int unsigned LAT_TABLE   = 1;
  localparam int unsigned LAT_FIX2FLT = 1;
  localparam int unsigned LAT_FPMUL   = 2;

  function automatic int unsigned cordic_latency(input int unsigned iter);
    return iter + 1;  // one register per iteration plus the x + y register
  endfunction

  function automatic int unsigned core_latency(input int unsigned iter);
    return LAT_EXTRACT + cordic_latency(iter) + LAT_FIX2FLT + LAT_FPMUL;
  endfunction

  // exp(i) rounded to the nearest IEEE 754 single (ties to even), worked out
  // at elaboration from the real-valued $exp: +inf when it exceeds the
  // largest single, a subnormal below 2^-126, +0 below half the smallest
  // subnormal. Used to fill the integer-part table.
  function automatic logic [31:0] exp_int_entry(input int i);
    real r, m, fl;
    int  e;
    logic [31:0] f;
    r = $exp(real'(i));
    e = 0;
    m = r;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    if (e < -126) begin           // subnormal: units of 2^-149
      m = r;
      for (int k = 0; k < 149; k++) m = m * 2.0;
      e = -127;
    end else begin                // normal: units of 2^(e-23)
      m = m * 8388608.0;
    end
    fl = $floor(m);
    if ((m - fl > 0.5) || ((m - fl == 0.5) && ($rtoi(fl) % 2 == 1)))
      fl = fl + 1.0;
    if (fl >= 16777216.0) begin   // rounding carried into the next binade
      fl = fl / 2.0;
      e++;
    end
    if (e == -127 && fl >= 8388608.0) e = -126;  // subnormal rounded up to normal
    if (e > 127)
      f = 32'h7F80_0000;
    else if (e == -127)
      f = {9'd0, 23'($rtoi(fl))};
    else
      f = {1'b0, 8'(e + 127), 23'($rtoi(fl))};
    return f;
  endfunction

  // Number of leading zeros of a 32-bit word (32 for zero).
  function automatic logic [5:0] lzc32(input logic [31:0] v);
    logic [5:0] n;
    logic       found;
    n = 6'd32;
    found = 1'b0;
    for (int b = 31; b >= 0; b--) begin
      if (!found && v[b]) begin
        n = 6'(31 - b);
        found = 1'b1;
      end
    end
    return n;
  endfunction

endpackage
