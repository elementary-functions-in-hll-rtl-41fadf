// tb_exp_bits_extract: self-checking test of the argument split x = i + f.
//
// Drives random arguments of every magnitude (plus zero, subnormals, +/-inf,
// NaN and values just inside and outside +/-128), one per cycle, and checks
// each registered output one cycle later against a reference computed in
// real arithmetic: the 8.24 value is x * 2^24 truncated toward zero, i its
// floor in units of 1 and f the remainder. Saturation and NaN are checked
// separately.
module tb_exp_bits_extract;
  import exp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  float_t x = '0;
  logic out_valid;
  logic signed [7:0] i_part;
  logic [31:0] f_part;
  logic nan;

  int checks = 0, failures = 0;

  exp_bits_extract dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] xv);
    int exp_i;
    logic [31:0] exp_f;
    bit  exp_nan;
    real xr, fx;
    longint fixed;
    x = xv;
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    exp_nan = is_nan(xv);
    if (exp_nan) begin
      checks++;
      if (!nan || !out_valid) begin
        failures++;
        $display("FAIL nan flag for %h", xv);
      end
      return;
    end
    if (is_inf(xv)) xr = xv[31] ? -1.0e6 : 1.0e6;
    else            xr = f2r(xv);
    if (xr >= 128.0) begin
      exp_i = 127; exp_f = {2'b00, 24'hFFFFFF, 6'd0};
    end else if (xr < -128.0) begin
      exp_i = -128; exp_f = 0;
    end else begin
      fx = xr * pow2(24);
      fixed = longint'($rtoi(fx));         // truncates toward zero
      if (xv[30:23] == 0) fixed = 0;       // subnormals taken as zero
      exp_i = int'(fixed >>> 24);
      exp_f = {2'b00, fixed[23:0], 6'd0};
    end
    checks++;
    if (!out_valid || nan || int'(i_part) != exp_i || f_part != exp_f) begin
      failures++;
      $display("FAIL x=%h (%g): got i=%0d f=%h, want i=%0d f=%h", xv, xr,
               i_part, f_part, exp_i, exp_f);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // Fixed corner cases.
    check_one(32'h0000_0000);
    check_one(32'h8000_0000);
    check_one(32'h0000_0123);           // subnormal
    check_one(32'h3F80_0000);           // 1.0
    check_one(32'hBF80_0000);           // -1.0
    check_one(32'hBF00_0000);           // -0.5
    check_one(32'h42FE_0000);           // 127.0
    check_one(32'h42FF_FFFF);           // 127.99999
    check_one(32'h4300_0000);           // 128.0 (saturates)
    check_one(32'hC300_0000);           // -128.0
    check_one(32'hC2FF_FFFF);           // -127.99999
    check_one(32'hC300_0001);           // just below -128
    check_one(32'h7F80_0000);           // +inf
    check_one(32'hFF80_0000);           // -inf
    check_one(32'h7FC0_0000);           // NaN
    check_one(32'hFF80_0001);           // NaN
    check_one(32'h3380_0000);           // 2^-24
    check_one(32'hB380_0000);           // -2^-24
    check_one(32'h3300_0000);           // 2^-25, below the 8.24 resolution
    // Random arguments over all exponents that matter.
    for (int n = 0; n < 20000; n++) begin
      int e;
      e = int'($urandom_range(140, 90));
      check_one({1'($urandom), 8'(e), 23'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
