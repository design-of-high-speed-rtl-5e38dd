// fp_mul: IEEE-754 single-precision (binary32) floating-point multiplier.
//
// The steps follow the design's FPPE multiplier:
//   1. if either operand is zero the result is zero;
//   2. the 24-bit significands (hidden 1 restored) are multiplied;
//   3. the exponents are added and the bias (127) subtracted;
//   4. the sign is the XOR of the operand signs;
//   5. a product of 2.0 or more is normalised by one right shift and an
//      exponent increment;
//   6. the significand is rounded to 23 fraction bits;
//   7. overflow and underflow are detected.
// Rounding is to nearest, ties to even. Subnormal operands are treated as
// zero, a result below the normal range is flushed to a signed zero
// (underflow) and one above it becomes a signed infinity (overflow).
// Infinity and NaN operands give the IEEE results (inf*0 and NaN give a quiet
// NaN) and raise `invalid`. These exception policies are this design's
// choices; the document only asks that overflow and underflow be checked.
//
// Timing: one register stage. x and y are sampled with in_valid on a rising
// clk edge; z, flags and out_valid appear after that edge (latency 1, one
// product per cycle). rst is synchronous, active high, and clears out_valid.
module fp_mul
  import fppe_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  fp32_t     x,
  input  fp32_t     y,
  output logic      out_valid,
  output fp32_t     z,
  output fp_flags_t flags
);

  localparam int unsigned SIG_W = FP_FRAC_W + 1;  // 24, with the hidden bit
  localparam int unsigned PRD_W = 2 * SIG_W;      // 48

  logic               sign;
  logic               x_zero, y_zero, x_special, y_special, x_nan, y_nan;
  logic [PRD_W-1:0]   prod;
  logic [FP_FRAC_W-1:0] frac_pre;
  logic               guard, sticky, round_up;
  logic [FP_FRAC_W:0] frac_rnd;                   // one carry bit above the fraction
  logic signed [9:0]  exp_sum;                    // wide enough for -126 .. 382
  logic signed [9:0]  exp_fin;
  fp32_t              z_d;
  fp_flags_t          flags_d;

  always_comb begin
    sign      = x.sign ^ y.sign;
    x_zero    = (x.exponent == '0);
    y_zero    = (y.exponent == '0);
    x_special = (x.exponent == '1);
    y_special = (y.exponent == '1);
    x_nan     = x_special && (x.fraction != '0);
    y_nan     = y_special && (y.fraction != '0);

    // Significand product, 1.f * 1.f in [1, 4).
    prod    = {1'b1, x.fraction} * {1'b1, y.fraction};
    exp_sum = 10'(signed'({2'b00, x.exponent})) + 10'(signed'({2'b00, y.exponent}))
              - 10'(FP_BIAS);

    // Normalisation: one right shift when the product is 2.0 or more.
    if (prod[PRD_W-1]) begin
      frac_pre = prod[PRD_W-2 -: FP_FRAC_W];
      guard    = prod[SIG_W-1];
      sticky   = |prod[SIG_W-2:0];
      exp_sum  = exp_sum + 10'sd1;
    end else begin
      frac_pre = prod[PRD_W-3 -: FP_FRAC_W];
      guard    = prod[SIG_W-2];
      sticky   = |prod[SIG_W-3:0];
    end

    // Round to nearest, ties to even.
    round_up = guard && (sticky || frac_pre[0]);
    frac_rnd = {1'b0, frac_pre} + {{FP_FRAC_W{1'b0}}, round_up};
    exp_fin  = frac_rnd[FP_FRAC_W] ? exp_sum + 10'sd1 : exp_sum;

    flags_d = '0;
    z_d     = '{sign: sign, exponent: exp_fin[FP_EXP_W-1:0], fraction: frac_rnd[FP_FRAC_W-1:0]};

    if (x_nan || y_nan || (x_special && y_zero) || (y_special && x_zero)) begin
      z_d             = FP_QNAN;
      flags_d.invalid = 1'b1;
    end else if (x_special || y_special) begin
      z_d             = '{sign: sign, exponent: '1, fraction: '0};
      flags_d.invalid = 1'b1;
    end else if (x_zero || y_zero) begin
      z_d          = '{sign: sign, exponent: '0, fraction: '0};
      flags_d.zero = 1'b1;
    end else if (exp_fin >= 10'sd255) begin
      z_d              = '{sign: sign, exponent: '1, fraction: '0};
      flags_d.overflow = 1'b1;
    end else if (exp_fin <= 10'sd0) begin
      z_d               = '{sign: sign, exponent: '0, fraction: '0};
      flags_d.underflow = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      z         <= '0;
      flags     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        z     <= z_d;
        flags <= flags_d;
      end
    end
  end

endmodule
