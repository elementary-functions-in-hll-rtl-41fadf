// tb_fp_mul: checks the single-precision multiplier.
//
// Random operand pairs are streamed one per cycle (with idle cycles) and
// each result is checked two cycles after its operands. The reference is
// the exact product of the two operand values in real arithmetic (24 x 24
// bits fit a double), so a normal result must be within half an ulp of it,
// ties to even. Results at or above 2^128 must be inf, results that round
// below 2^-126 must be a signed zero (subnormal results are flushed). NaN,
// inf, zero and 0 * inf operands, and subnormal operands like the
// smallest exp(i) table entries, are included.
module tb_fp_mul;
  import exp_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 2;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  float_t a = '0, b = '0;
  logic out_valid;
  float_t y;

  int checks = 0, failures = 0;
  int n_sub = 0, n_ovf = 0, n_unf = 0, n_tie = 0;

  fp_mul dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { logic [31:0] a, b; longint t; } item_t;
  item_t pending[$];

  function automatic bit fail_msg(input item_t it, input string why);
    $display("FAIL %h * %h -> %h: %s", it.a, it.b, y, why);
    return 1'b1;
  endfunction

  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      item_t it;
      bit bad;
      real p, ap, d, u;
      bit   s;
      checks++;
      bad = 0;
      if (pending.size() == 0) bad = fail_msg(it, "unexpected result");
      else begin
        it = pending.pop_front();
        s  = it.a[31] ^ it.b[31];
        if (cycle - it.t != longint'(LAT)) bad = fail_msg(it, "latency");
        if (is_nan(it.a) || is_nan(it.b) ||
            (is_inf(it.a) && it.b[30:0] == 0) || (is_inf(it.b) && it.a[30:0] == 0)) begin
          if (y != FLOAT_QNAN) bad = fail_msg(it, "want qNaN");
        end else if (is_inf(it.a) || is_inf(it.b)) begin
          if (y != {s, 8'hFF, 23'd0}) bad = fail_msg(it, "want inf");
        end else begin
          p  = f2r(it.a) * f2r(it.b);
          ap = (p < 0.0) ? -p : p;
          if (ap >= pow2(128) * (1.0 - pow2(-25))) begin
            n_ovf++;
            if (y != {s, 8'hFF, 23'd0}) bad = fail_msg(it, "want inf (overflow)");
          end else if (ap < pow2(-126) * (1.0 - pow2(-25))) begin
            if (ap != 0.0) n_unf++;
            if (y != {s, 31'd0}) bad = fail_msg(it, "want signed zero");
          end else if (ap > pow2(-126)) begin
            d = f2r(y) - p;
            if (d < 0.0) d = -d;
            u = ulp_of(y);
            if (d == 0.5 * u) n_tie++;
            if (y.sign != s || y.exp == 0 || y.exp == 8'hFF || d > 0.5 * u ||
                (d == 0.5 * u && y.man[0]))
              bad = fail_msg(it, $sformatf("want %g, got %g", p, f2r(y)));
          end
        end
      end
      if (bad) failures++;
    end
  end

  task automatic send(input logic [31:0] av, input logic [31:0] bv);
    a = av; b = bv;
    in_valid = 1'b1;
    @(posedge clk);
    pending.push_back('{a: av, b: bv, t: cycle});
    #1 in_valid = 1'b0;
    if ($urandom_range(7, 0) == 0) begin @(posedge clk); #1; end
  endtask

  function automatic logic [31:0] rnd_float();
    logic [31:0] v;
    v = $urandom;
    case ($urandom_range(9, 0))
      0: v[30:23] = 8'h00;                                   // subnormal or zero
      1: v[30:23] = 8'hFF;                                   // inf or NaN
      2: v[30:0]  = 0;                                       // signed zero
      default: v[30:23] = 8'($urandom_range(127 + 70, 127 - 70));
    endcase
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    send(32'h3F80_0000, 32'h3F80_0000);           // 1 * 1
    send(32'h7F80_0000, 32'h0000_0000);           // inf * 0
    send(32'h7F80_0000, 32'hBF80_0000);           // inf * -1
    send(32'h0000_000A, 32'h402D_F854);           // subnormal table entry * e
    send(32'h0040_0000, 32'h4000_0000);           // 2^-127 * 2 = 2^-126
    send(32'h0080_0000, 32'h3F00_0000);           // 2^-126 * 0.5 -> flushed
    send(32'h7F7F_FFFF, 32'h3FC0_0000);           // overflow
    send(32'h7F7F_FFFF, 32'h3F80_0000);           // max * 1
    send(32'h3F80_0001, 32'h3F80_0001);           // tie case material
    for (int n = 0; n < 30000; n++) begin
      logic [31:0] av, bv;
      av = rnd_float();
      bv = rnd_float();
      if (n % 3 == 0) begin                        // exp(i) * exp(f)-like pairs
        av = ($urandom_range(1, 0) != 0) ? {9'd0, 23'($urandom)} : {1'b0, 8'($urandom_range(254, 1)), 23'($urandom)};
        bv = {1'b0, 8'($urandom_range(128, 127)), 23'($urandom)};
      end
      if (n % 3 == 1) begin                        // 1.5 * a: an exact tie when a is odd
        av = {1'($urandom), 8'($urandom_range(200, 50)), 23'($urandom)};
        bv = 32'h3FC0_0000;
      end
      if (n_sub < 1000 && av[30:23] == 0 && av[22:0] != 0) n_sub++;
      send(av, bv);
    end
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (pending.size() != 0) begin
      failures++; $display("FAIL %0d results missing", pending.size());
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_sub == 0 || n_tie == 0) begin
      failures++; $display("FAIL coverage: overflow %0d underflow %0d subnormal %0d ties %0d", n_ovf, n_unf, n_sub, n_tie);
    end
    $display("overflow %0d underflow %0d subnormal operands %0d ties %0d", n_ovf, n_unf, n_sub, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
