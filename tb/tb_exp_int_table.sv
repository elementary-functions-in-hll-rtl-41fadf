// tb_exp_int_table: checks every entry of the exp(i) table.
//
// Reads all 256 addresses (one per cycle, data one cycle later) and compares
// each word with exp(i) computed by the simulator's $exp: a normal entry
// must be within half an ulp of it (correct rounding), a subnormal entry
// within half of the smallest subnormal, entries for i >= 89 must be +inf
// and entries for i <= -104 must be +0.
module tb_exp_int_table;
  import exp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0;
  logic signed [7:0] addr = '0;
  float_t data;

  int checks = 0, failures = 0;

  exp_int_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i <= 127; i++) begin
      real r, err;
      addr = 8'(i);
      @(posedge clk);
      #1;
      r = $exp(real'(i));
      checks++;
      if (i >= 89) begin
        if (!is_inf(data) || data.sign) begin
          failures++; $display("FAIL i=%0d: %h, want +inf", i, data);
        end
      end else if (i <= -104) begin
        if (data != '0) begin
          failures++; $display("FAIL i=%0d: %h, want 0", i, data);
        end
      end else begin
        err = f2r(data) - r;
        if (err < 0.0) err = -err;
        if (data.sign || is_inf(data) || is_nan(data) ||
            err > 0.5 * ulp_of(data) * (1.0 + 1.0e-9)) begin
          failures++;
          $display("FAIL i=%0d: %h = %g, want %g", i, data, f2r(data), r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
