// tb_cordic_exp: self-checking test of the hyperbolic CORDIC exp(f).
//
// Streams fractions f in [0, 1) into the pipeline, one per cycle with
// occasional idle cycles, and checks that
//   * each result leaves exactly ITER + 1 cycles after its input,
//   * results keep their order and one result leaves per accepted input,
//   * the 2.30 result is within TOL_LSB (2^-25, about a fifth of a single
//     ulp at 1.0) of exp(f) from $exp; truncating shifts give a bias, and
//   * edge fractions are handled (0, the smallest step, just below 1).
module tb_cordic_exp;
  import exp_pkg::*;
  import tb_fp_pkg::*;

  localparam int unsigned ITER    = 32;
  localparam int unsigned LAT     = ITER + 1;
  localparam real         TOL_LSB = 32.0;   // 2^-25, in units of 2^-30

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic [31:0] f = '0;
  logic out_valid;
  logic [31:0] exp_f;

  int checks = 0, failures = 0;
  real max_err = 0.0;

  cordic_exp #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] f; longint t; } item_t;
  item_t pending[$];
  int sent = 0, got = 0;

  // Checker: sampled just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      item_t it;
      real want, err;
      got++;
      checks++;
      if (pending.size() == 0) begin
        failures++; $display("FAIL result with no input");
      end else begin
        it = pending.pop_front();
        if (cycle - it.t != longint'(LAT)) begin
          failures++;
          $display("FAIL latency %0d, want %0d", cycle - it.t, LAT);
        end
        want = $exp(real'(it.f) * pow2(-30));
        err  = real'(exp_f) * pow2(-30) - want;
        if (err < 0.0) err = -err;
        err = err * pow2(30);
        if (err > max_err) max_err = err;
        if (err > TOL_LSB) begin
          failures++;
          $display("FAIL f=%h: got %h, want %g (err %g lsb)", it.f, exp_f, want, err);
        end
      end
    end
  end

  task automatic send(input logic [31:0] fv);
    f = fv;
    in_valid = 1'b1;
    @(posedge clk);
    pending.push_back('{f: fv, t: cycle});
    sent++;
    #1 in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    send(32'h0000_0000);
    send(32'h0000_0040);
    send(32'h3FFF_FFC0);
    send(32'h2000_0000);
    for (int n = 0; n < 20000; n++) begin
      send({2'b00, 24'($urandom), 6'd0});
      if ($urandom_range(7, 0) == 0) begin @(posedge clk); #1; end
    end
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (got != sent) begin
      failures++; $display("FAIL sent %0d, received %0d", sent, got);
    end
    $display("max error %g lsb of 2^-30", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
