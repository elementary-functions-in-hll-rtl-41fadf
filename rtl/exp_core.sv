// exp_core: fully pipelined IEEE 754 single-precision exp(x).
//
// The argument is split as x = i + f with i = floor(x), an 8-bit signed
// integer, and 0 <= f < 1. exp(i) is read from a 256-entry table of
// precomputed floats; exp(f) is computed by a hyperbolic CORDIC in 2.30 fixed
// point and cast to a float; the two are multiplied, the only floating-point
// operation, to give exp(x) = exp(i) * exp(f). The two branches run side by
// side and the table value is delayed to meet the CORDIC result:
//
//   x -> exp_bits_extract -+-> i -> exp_int_table -> delay_line --+
//                          |                                      +-> fp_mul -> y
//                          +-> f -> cordic_exp -> fix2float ------+
//
// This structure, the table, the 8-bit integer part, the 2.30 CORDIC and the
// single multiplication follow the published design. The unrolled
// one-iteration-per-stage pipeline, the register placement and the special
// values are this design's choices: a NaN argument gives a quiet NaN,
// x >= 89 (and +inf) gives +inf, and results below 2^-126 (x below about
// -87.34, and -inf) give +0.
//
// Interface: no stall; an argument may enter every cycle with in_valid, and
// its result leaves core_latency(ITER) = ITER + 5 cycles later (37 at the
// default 32 iterations) with out_valid.
module exp_core
  import exp_pkg::*;
#(
  parameter int unsigned ITER = ITER_DEFAULT  // CORDIC iterations
)(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  float_t x,
  output logic   out_valid,
  output float_t y
);

  localparam int unsigned LATENCY = core_latency(ITER);

  // Split.
  logic              ex_valid;
  logic signed [7:0] i_part;
  logic [FIX_W-1:0]  f_part;
  logic              ex_nan;

  exp_bits_extract u_extract (
    .clk, .rst, .in_valid, .x,
    .out_valid(ex_valid), .i_part, .f_part, .nan(ex_nan)
  );

  // Integer branch: table read, NaN substitution, delay to the CORDIC branch.
  float_t tab_q, tab_nan, tab_d;
  logic   nan_q;

  exp_int_table u_table (.clk, .addr(i_part), .data(tab_q));

  always_ff @(posedge clk) nan_q <= ex_nan;

  assign tab_nan = nan_q ? FLOAT_QNAN : tab_q;

  delay_line #(
    .WIDTH($bits(float_t)),
    .DEPTH(cordic_latency(ITER) + LAT_FIX2FLT - LAT_TABLE)
  ) u_align (.clk, .d(tab_nan), .q(tab_d));

  // Fraction branch.
  logic             co_valid;
  logic [FIX_W-1:0] exp_f_fix;
  logic             fl_valid;
  float_t           exp_f;

  cordic_exp #(.ITER(ITER)) u_cordic (
    .clk, .rst, .in_valid(ex_valid), .f(f_part),
    .out_valid(co_valid), .exp_f(exp_f_fix)
  );

  fix2float u_cast (
    .clk, .rst, .in_valid(co_valid), .a(exp_f_fix),
    .out_valid(fl_valid), .y(exp_f)
  );

  // exp(x) = exp(i) * exp(f).
  fp_mul u_mul (
    .clk, .rst, .in_valid(fl_valid), .a(tab_d), .b(exp_f),
    .out_valid, .y
  );

  // The result of an argument accepted LATENCY cycles ago must be leaving now.
  logic [LATENCY-1:0] vhist;
  always_ff @(posedge clk) begin
    if (rst) vhist <= '0;
    else     vhist <= {vhist[LATENCY-2:0], in_valid};
  end
  assert property (@(posedge clk) disable iff (rst) out_valid == vhist[LATENCY-1])
    else $error("exp_core: out_valid out of step with the %0d-cycle latency", LATENCY);

endmodule
