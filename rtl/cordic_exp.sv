// cordic_exp: exp(f) for 0 <= f < 1 by hyperbolic CORDIC in rotation mode.
//
// Three 2.30 registers x, y, z start at x = 1/K (the inverse of the
// hyperbolic CORDIC gain), y = 0, z = f. Iteration k, with shift s = s(k)
// from exp_pkg (1, 2, 3, 4, 4, 5, ..., 13, 13, ..., 30), does
//     d = -1 if z < 0, else +1
//     x <- x + d * (y >>> s)
//     y <- y + d * (x >>> s)
//     z <- z - d * atanh(2^-s)
// which drives z to 0 and rotates (1/K, 0) hyperbolically by the angle f,
// leaving x = cosh(f) and y = sinh(f). The result is exp(f) = x + y, which
// lies in [1, e) and is delivered as an unsigned 2.30 number (the signed
// 2.30 range ends at 2).
//
// The direction rule, the z update with its arctanh table, the hyperbolic
// rotation matrix and the 2.30 format follow the published design. Its x/y
// update is printed with a minus sign on the y line, which would make the
// rotation circular rather than hyperbolic; this module uses the signs of
// the hyperbolic rotation matrix instead, so exp(f) is the sum cosh + sinh.
// The shift schedule with repeated shifts 4 and 13, the 1/K start value and
// the truncating arithmetic shifts are this design's choices; the result is
// within 2^-25 of exp(f).
//
// The loop is unrolled into ITER pipeline registers plus one register for
// x + y: a new f is accepted every cycle and its result appears ITER + 1
// cycles later with out_valid. No stall.
module cordic_exp
  import exp_pkg::*;
#(
  parameter int unsigned ITER = ITER_DEFAULT  // iterations, at most ITER_MAX
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [FIX_W-1:0] f,        // unsigned 2.30, 0 <= f < 1
  output logic             out_valid,
  output logic [FIX_W-1:0] exp_f     // unsigned 2.30, exp(f)
);

  typedef logic signed [FIX_W-1:0] fix_t;

  // g_iter[k] holds the registers after iteration k + 1.
  for (genvar k = 0; k < ITER; k++) begin : g_iter
    localparam int unsigned S = cordic_shift(k);
    localparam fix_t        H = fix_t'(HTAB[k]);
    fix_t xi, yi, zi, xs, ys;
    logic vi;
    fix_t x_r, y_r, z_r;
    logic v_r;
    if (k == 0) begin : g_first
      // The input enters with x = 1/K, y = 0, z = f.
      assign xi = fix_t'(CORDIC_X0);
      assign yi = '0;
      assign zi = fix_t'(f);
      assign vi = in_valid;
    end else begin : g_next
      assign xi = g_iter[k-1].x_r;
      assign yi = g_iter[k-1].y_r;
      assign zi = g_iter[k-1].z_r;
      assign vi = g_iter[k-1].v_r;
    end
    assign xs = xi >>> S;
    assign ys = yi >>> S;
    always_ff @(posedge clk) begin
      if (rst) v_r <= 1'b0;
      else     v_r <= vi;
      if (zi[FIX_W-1]) begin      // z < 0: d = -1
        x_r <= xi - ys;
        y_r <= yi - xs;
        z_r <= zi + H;
      end else begin              // d = +1
        x_r <= xi + ys;
        y_r <= yi + xs;
        z_r <= zi - H;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= g_iter[ITER-1].v_r;
    exp_f <= g_iter[ITER-1].x_r + g_iter[ITER-1].y_r;
  end

  initial assert (ITER >= 1 && ITER <= ITER_MAX)
    else $fatal(1, "cordic_exp: ITER must be 1..%0d", ITER_MAX);

endmodule
