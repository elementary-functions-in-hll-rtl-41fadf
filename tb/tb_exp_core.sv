// tb_exp_core: end-to-end test of the exp(x) core at its default size.
//
// Streams single-precision arguments into the core, one per cycle with
// random idle cycles, and checks every result against $exp(x):
//   * the result leaves exactly core_latency(32) = 37 cycles after x, in
//     order, one per accepted argument (throughput one per cycle);
//   * a normal result is within TOL_ULP ulps of exp(x) (truncation of x to
//     8.24 fixed point, the table and cast roundings, the CORDIC error and
//     the final multiplication each add a fraction of an ulp);
//   * exp(x) beyond the largest float gives +inf, exp(x) below 2^-126
//     gives +0 (subnormal results are flushed), NaN gives the quiet NaN.
// Values within a millionth of the two limits are not judged.
// It also counts how often each mechanism of the core was exercised and
// counts a failure for any that never was: positive and negative
// arguments, overflow to inf, flush to zero, saturation of |x| >= 128 and
// of +/-inf, NaN, a subnormal table entry feeding a normal result, an
// argument below the 2^-24 resolution, back-to-back and idle cycles.
module tb_exp_core;
  import exp_pkg::*;
  import tb_fp_pkg::*;

  localparam int  LAT     = int'(core_latency(ITER_DEFAULT));
  localparam real TOL_ULP = 3.0;
  localparam int  N       = 40000;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  float_t x = '0;
  logic out_valid;
  float_t y;

  int checks = 0, failures = 0;
  real max_ulp = 0.0;

  exp_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef enum int {M_POS, M_NEG, M_OVF, M_UNF, M_SAT, M_INF_IN, M_NAN,
                    M_SUBTAB, M_TINY, M_B2B, M_IDLE, M_NUM} mech_e;
  int mech[M_NUM];
  string mech_name[M_NUM] = '{"positive x", "negative x", "overflow to inf",
                              "flush to zero", "|x| >= 128 saturation",
                              "infinite x", "NaN x", "subnormal table entry",
                              "x below 2^-24", "back-to-back", "idle cycle"};

  typedef struct { logic [31:0] x; longint t; } item_t;
  item_t pending[$];
  int sent = 0, got = 0;

  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      item_t it;
      real xr, r;
      got++;
      checks++;
      if (pending.size() == 0) begin
        failures++; $display("FAIL result with no argument");
      end else begin
        it = pending.pop_front();
        if (cycle - it.t != longint'(LAT)) begin
          failures++; $display("FAIL latency %0d, want %0d", cycle - it.t, LAT);
        end
        if (is_nan(it.x)) begin
          mech[M_NAN]++;
          if (y != FLOAT_QNAN) begin failures++; $display("FAIL NaN -> %h", y); end
        end else begin
          if (is_inf(it.x)) begin
            mech[M_INF_IN]++;
            xr = it.x[31] ? -1000.0 : 1000.0;
          end else begin
            xr = f2r(it.x);
          end
          if (xr > 0.0) mech[M_POS]++;
          if (xr < 0.0) mech[M_NEG]++;
          if (xr >= 128.0 || xr <= -128.0) mech[M_SAT]++;
          if (xr != 0.0 && xr < pow2(-24) && xr > -pow2(-24)) mech[M_TINY]++;
          r = $exp(xr);
          if (r > pow2(128) * (1.0 + 1.0e-6)) begin
            mech[M_OVF]++;
            if (y != 32'h7F80_0000) begin
              failures++; $display("FAIL x=%h (%g): got %h, want +inf", it.x, xr, y);
            end
          end else if (r < pow2(-126) * (1.0 - 1.0e-6)) begin
            mech[M_UNF]++;
            if (y != 32'h0000_0000) begin
              failures++; $display("FAIL x=%h (%g): got %h, want +0", it.x, xr, y);
            end
          end else if (r < pow2(128) * (1.0 - 1.0e-6) && r > pow2(-126) * (1.0 + 1.0e-6)) begin
            real e;
            if (xr < -87.0 && xr >= -88.0) mech[M_SUBTAB]++;
            if (y.sign || y.exp == 0 || y.exp == 8'hFF) e = 1.0e9;
            else e = ulp_err(y, r);
            if (e > max_ulp) max_ulp = e;
            if (e > TOL_ULP) begin
              failures++;
              $display("FAIL x=%h (%g): got %h (%g), want %g, %g ulp", it.x, xr, y, f2r(y), r, e);
            end
          end
        end
      end
    end
  end

  bit last_sent = 0;

  task automatic send(input logic [31:0] xv);
    x = xv;
    in_valid = 1'b1;
    @(posedge clk);
    pending.push_back('{x: xv, t: cycle});
    sent++;
    if (last_sent) mech[M_B2B]++;
    last_sent = 1;
    #1 in_valid = 1'b0;
    if ($urandom_range(9, 0) == 0) begin
      @(posedge clk); #1;
      mech[M_IDLE]++;
      last_sent = 0;
    end
  endtask

  // A float with the value r, truncated (enough for a test argument).
  function automatic logic [31:0] r2f(input real r);
    logic [31:0] v;
    real m;
    int  e;
    v = '0;
    if (r < 0.0) begin v[31] = 1'b1; r = -r; end
    if (r == 0.0) return v;
    e = 0;
    m = r;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    v[30:23] = 8'(e + 127);
    v[22:0]  = 23'($rtoi((m - 1.0) * pow2(23)));
    return v;
  endfunction

  function automatic real urand_real(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  initial begin
    foreach (mech[k]) mech[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // Directed arguments.
    send(32'h0000_0000);                  // exp(0) = 1
    send(32'h3F80_0000);                  // 1
    send(32'hBF80_0000);                  // -1
    send(32'h42B1_7218);                  // 88.7228 -> largest finite
    send(32'h42B2_0000);                  // 89 -> inf
    send(32'hC2AE_AC50);                  // -87.3365, near 2^-126
    send(32'hC2AF_0000);                  // -87.5 -> flushed
    send(32'hC2B0_0000);                  // -88 -> flushed
    send(32'h4300_0000);                  // 128
    send(32'hC300_0000);                  // -128
    send(32'h7F80_0000);                  // +inf
    send(32'hFF80_0000);                  // -inf
    send(32'h7FC0_0000);                  // NaN
    send(32'h3300_0000);                  // 2^-25
    send(32'hB300_0000);                  // -2^-25
    send(32'h0000_0001);                  // subnormal
    // Random arguments.
    for (int n = 0; n < N; n++) begin
      logic [31:0] v;
      case ($urandom_range(9, 0))
        0:       v = r2f(urand_real(-1.0, 1.0));
        1:       v = {1'($urandom), 8'($urandom_range(126, 90)), 23'($urandom)};
        2:       v = r2f(urand_real(-87.34, -87.0));
        3:       v = r2f(urand_real(-200.0, 200.0));
        4:       v = ($urandom_range(15, 0) == 0) ? 32'h7FC0_0001 : r2f(urand_real(85.0, 92.0));
        default: v = r2f(urand_real(-110.0, 95.0));
      endcase
      send(v);
    end
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (got != sent) begin
      failures++; $display("FAIL sent %0d, received %0d", sent, got);
    end
    foreach (mech[k]) begin
      checks++;
      $display("%-24s %0d", mech_name[k], mech[k]);
      if (mech[k] == 0) begin
        failures++; $display("FAIL never exercised: %s", mech_name[k]);
      end
    end
    $display("max error %g ulp", max_ulp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
