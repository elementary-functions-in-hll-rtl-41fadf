// tb_fix2float: checks the 2.30-to-single conversion for correct rounding.
//
// Drives random words of every length (leading-zero count 0..32), all words
// with an exact tie in the rounding position, and the extremes, one per
// cycle, and checks each result one cycle later: it must be the float
// nearest to a * 2^-30 (computed in real arithmetic, where it is exact),
// with ties going to the even mantissa, and zero must give +0.
module tb_fix2float;
  import exp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic [31:0] a = '0;
  logic out_valid;
  float_t y;

  int checks = 0, failures = 0;

  fix2float dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] av);
    real want, d, u;
    a = av;
    in_valid = 1'b1;
    @(posedge clk);
    #1 in_valid = 1'b0;
    checks++;
    want = real'(av) * pow2(-30);
    if (!out_valid) begin
      failures++; $display("FAIL no out_valid"); return;
    end
    if (av == 0) begin
      if (y != '0) begin failures++; $display("FAIL 0 -> %h", y); end
      return;
    end
    d = f2r(y) - want;
    if (d < 0.0) d = -d;
    u = ulp_of(y);
    if (y.sign || y.exp == 0 || d > 0.5 * u ||
        (d == 0.5 * u && y.man[0])) begin
      failures++;
      $display("FAIL a=%h: got %h (%g), want %g", av, y, f2r(y), want);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check_one(32'h0000_0000);
    check_one(32'h0000_0001);
    check_one(32'hFFFF_FFFF);          // rounds up into the next binade
    check_one(32'h4000_0000);          // 1.0
    check_one(32'h7FFF_FFC0);
    check_one(32'hFFFF_FF80);          // tie, odd -> up
    check_one(32'hFFFF_FE80);          // tie, even -> down
    check_one(32'h8000_0080);          // tie, even -> down
    check_one(32'h8000_0180);          // tie, odd -> up
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] v;
      v = $urandom >> $urandom_range(31, 0);
      if ($urandom_range(3, 0) == 0) v = {v[31:8], 8'h80};  // exact ties
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
