// fp_mul: IEEE 754 single-precision multiplier, two pipeline stages.
//
// Stage 1 unpacks both operands, normalises subnormal significands with a
// leading-zero count (so the table's subnormal exp(i) entries multiply
// correctly), multiplies the 24-bit significands into a 48-bit product and
// adds the exponents. Stage 2 normalises the product (its leading one is in
// bit 47 or 46), rounds to nearest with ties to even, and packs the result.
// Special cases: NaN in, or 0 * inf, gives the quiet NaN 0x7FC00000; inf
// times a non-zero number gives a signed inf; 0 times a finite number gives
// a signed 0; a result too large for a single gives a signed inf. Results
// below the smallest normal number (2^-126) are flushed to a signed zero:
// this core produces no subnormal outputs.
//
// It forms exp(x) = exp(i) * exp(f), the one floating-point operation of the
// published design; the pipeline depth, the full special-case handling and
// the flush of subnormal results are this design's choices.
//
// Interface: one operand pair per cycle with in_valid; the product appears
// two cycles later with out_valid. No stall.
module fp_mul
  import exp_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  float_t a,
  input  float_t b,
  output logic   out_valid,
  output float_t y
);

  typedef enum logic [1:0] {K_NUM, K_ZERO, K_INF, K_NAN} kind_e;

  // ---- stage 1: unpack, normalise, multiply --------------------------------
  function automatic kind_e classify(input float_t v);
    if (v.exp == 8'hFF) return (v.man != '0) ? K_NAN : K_INF;
    if (v.exp == 8'h00 && v.man == '0) return K_ZERO;
    return K_NUM;
  endfunction

  // Significand with the leading one in bit 23 and its unbiased exponent.
  function automatic void unpack(input float_t v, output logic [23:0] sig,
                                 output logic signed [9:0] e);
    logic [5:0] lz;
    if (v.exp == 8'h00) begin
      lz  = lzc32({v.man, 9'd0}) + 6'd1;   // shift that brings the top set bit to bit 23
      sig = {1'b0, v.man} << lz;
      e   = -10'sd126 - 10'(signed'({4'd0, lz}));
    end else begin
      sig = {1'b1, v.man};
      e   = 10'(signed'({2'b00, v.exp})) - 10'sd127;
    end
  endfunction

  kind_e            ka, kb;
  logic [23:0]      sa, sb;
  logic signed [9:0] ea, eb;

  always_comb begin
    ka = classify(a);
    kb = classify(b);
    unpack(a, sa, ea);
    unpack(b, sb, eb);
  end

  logic             v1;
  logic             sign1;
  kind_e            kind1;
  logic [47:0]      prod1;
  logic signed [10:0] e1;     // unbiased exponent of bit 46 of the product

  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else     v1 <= in_valid;
    sign1 <= a.sign ^ b.sign;
    prod1 <= sa * sb;
    e1    <= 11'(ea) + 11'(eb);
    if (ka == K_NAN || kb == K_NAN ||
        (ka == K_ZERO && kb == K_INF) || (ka == K_INF && kb == K_ZERO))
      kind1 <= K_NAN;
    else if (ka == K_INF || kb == K_INF)
      kind1 <= K_INF;
    else if (ka == K_ZERO || kb == K_ZERO)
      kind1 <= K_ZERO;
    else
      kind1 <= K_NUM;
  end

  // ---- stage 2: normalise, round, pack -------------------------------------
  logic [23:0]        m;       // hidden one + 23 mantissa bits before rounding
  logic               g, st, rnd;
  logic [24:0]        m_r;
  logic signed [11:0] eb2;     // biased exponent after rounding
  float_t             res;

  always_comb begin
    if (prod1[47]) begin
      m   = prod1[47:24];
      g   = prod1[23];
      st  = |prod1[22:0];
      eb2 = 12'(e1) + 12'sd128;
    end else begin
      m   = prod1[46:23];
      g   = prod1[22];
      st  = |prod1[21:0];
      eb2 = 12'(e1) + 12'sd127;
    end
    rnd = g && (st || m[0]);
    m_r = {1'b0, m} + 25'(rnd);
    if (m_r[24]) eb2 = eb2 + 12'sd1;   // 1.11..1 rounded up to 10.0

    res.sign = sign1;
    res.exp  = 8'(eb2);
    res.man  = m_r[24] ? 23'd0 : m_r[22:0];
    unique case (kind1)
      K_NAN:  res = FLOAT_QNAN;
      K_INF:  begin res.exp = 8'hFF; res.man = '0; end
      K_ZERO: begin res.exp = 8'h00; res.man = '0; end
      default: begin
        if (eb2 >= 12'sd255) begin        // overflow
          res.exp = 8'hFF;
          res.man = '0;
        end else if (eb2 <= 12'sd0) begin // underflow, flushed
          res.exp = 8'h00;
          res.man = '0;
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v1;
    y <= res;
  end

endmodule
