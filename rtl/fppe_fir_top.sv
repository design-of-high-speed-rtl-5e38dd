// fppe_fir_top: the complete design, four units side by side on one clock
// and one synchronous active-high reset.
//
//   fir_filter  51-tap direct-form FIR filter, multiplier-free taps
//               (ports fir_*)
//   fold_adder  three-operand adder folded onto one adder and one register,
//               folding factor 2 (ports fold_*)
//   shift_unit  one-bit ALU shifter with carry out (ports sh_*)
//   fp_mul      IEEE-754 single-precision multiplier (ports fpm_*)
//   fppe_main   FPPE datapath: operand registers, adder, multiplier, divider
//               (ports pe_*)
//
// The units share no data path: the design describes each of them but does
// not say how they exchange data, so each keeps its own ports and timing
// (see the modules). Bringing them out separately is this design's choice.
module fppe_fir_top
  import fppe_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  // FIR filter
  input  logic                          fir_coef_we,
  input  logic [FIR_ADDR_W-1:0]         fir_coeff_add,
  input  logic signed [FIR_COEF_W-1:0]  fir_coef_in,
  input  logic                          fir_valid,
  input  logic signed [FIR_DATA_W-1:0]  fir_x,
  output logic                          fir_out_valid,
  output logic signed [FIR_DATA_W-1:0]  fir_d_out,
  // folded adder
  input  logic signed [15:0]            fold_a,
  input  logic signed [15:0]            fold_b,
  input  logic signed [15:0]            fold_c,
  output logic                          fold_slot,
  output logic signed [17:0]            fold_y,
  output logic                          fold_y_valid,
  // ALU shift unit
  input  logic [15:0]                   sh_operand,
  input  shift_op_t                     sh_op,
  input  logic                          sh_carry_in,
  output logic [15:0]                   sh_result,
  output logic                          sh_carry_out,
  // floating-point multiplier
  input  logic                          fpm_in_valid,
  input  fp32_t                         fpm_x,
  input  fp32_t                         fpm_y,
  output logic                          fpm_out_valid,
  output fp32_t                         fpm_z,
  output fp_flags_t                     fpm_flags,
  // FPPE datapath
  input  logic                          pe_load,
  input  logic signed [15:0]            pe_a,
  input  logic signed [15:0]            pe_b,
  input  logic signed [15:0]            pe_c,
  output logic signed [15:0]            pe_sum,
  output logic                          pe_sum_cout,
  output logic                          pe_product_valid,
  output logic signed [31:0]            pe_product,
  input  logic                          pe_div_enable,
  input  logic [15:0]                   pe_div_dividend,
  input  logic [15:0]                   pe_div_divisor,
  output logic                          pe_div_busy,
  output logic                          pe_div_done,
  output logic [15:0]                   pe_div_q,
  output logic [15:0]                   pe_div_r
);

  fir_filter u_fir (
    .clk       (clk),
    .reset     (rst),
    .coef_we   (fir_coef_we),
    .coeff_add (fir_coeff_add),
    .coef_in   (fir_coef_in),
    .valid     (fir_valid),
    .x         (fir_x),
    .out_valid (fir_out_valid),
    .d_out     (fir_d_out)
  );

  fold_adder #(.WIDTH(16)) u_fold (
    .clk     (clk),
    .rst     (rst),
    .a       (fold_a),
    .b       (fold_b),
    .c       (fold_c),
    .slot    (fold_slot),
    .y       (fold_y),
    .y_valid (fold_y_valid)
  );

  shift_unit #(.WIDTH(16)) u_shift (
    .operand   (sh_operand),
    .op        (sh_op),
    .carry_in  (sh_carry_in),
    .result    (sh_result),
    .carry_out (sh_carry_out)
  );

  fp_mul u_fpm (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (fpm_in_valid),
    .x         (fpm_x),
    .y         (fpm_y),
    .out_valid (fpm_out_valid),
    .z         (fpm_z),
    .flags     (fpm_flags)
  );

  fppe_main #(.WIDTH(16)) u_pe (
    .clk           (clk),
    .rst           (rst),
    .load          (pe_load),
    .a             (pe_a),
    .b             (pe_b),
    .c             (pe_c),
    .sum           (pe_sum),
    .sum_cout      (pe_sum_cout),
    .product_valid (pe_product_valid),
    .product       (pe_product),
    .div_enable    (pe_div_enable),
    .div_dividend  (pe_div_dividend),
    .div_divisor   (pe_div_divisor),
    .div_busy      (pe_div_busy),
    .div_done      (pe_div_done),
    .div_q         (pe_div_q),
    .div_r         (pe_div_r)
  );

endmodule
