// fir_filter: direct-form FIR filter, d_out(n) = sum_{k=0}^{TAPS-1} b[k] * x(n-k),
// built without multiplier cells.
//
// Structure (direct form): a tapped delay line z[0..TAPS-1] holds the last
// TAPS input samples, z[k] = x(n-k). Each tap product temp[k] = b[k] * z[k]
// is formed by a shift_add_mult (shifted copies of the sample selected by the
// coefficient bits, then added). The TAPS products are added into one
// accumulator word, which is scaled to the output width.
//
// Numbers: TAPS = 51 coefficients b[0:50], 16-bit two's complement samples
// and coefficients, 32-bit tap products and a 6-bit coefficient address, as
// in the design's simulation. The accumulator has PROD_W + ceil(log2(TAPS))
// bits and cannot overflow. The output is the accumulator shifted right by
// OUT_SHIFT (15: coefficients read as Q1.15 fractions) and saturated to 16
// bits; that scaling is this design's choice.
//
// Coefficient port: a rising clk edge with coef_we high writes coef_in to
// b[coeff_add]; addresses of TAPS and above are ignored. Coefficients reset
// to zero.
//
// Timing: a rising clk edge with valid high shifts x into the delay line;
// the next edge registers the tap products, the one after that registers the
// output. So d_out for the sample taken at edge t is presented after edge
// t+2 with out_valid high for one cycle; a new sample may come every cycle.
// reset is synchronous, active high, and clears the delay line, the
// pipeline and the coefficients.
module fir_filter
  import fppe_pkg::*;
#(
  parameter int unsigned TAPS      = FIR_TAPS,
  parameter int unsigned DATA_W    = FIR_DATA_W,
  parameter int unsigned COEF_W    = FIR_COEF_W,
  parameter int unsigned ADDR_W    = FIR_ADDR_W,
  parameter int unsigned OUT_SHIFT = 15
) (
  input  logic                     clk,
  input  logic                     reset,
  // coefficient load
  input  logic                     coef_we,
  input  logic [ADDR_W-1:0]        coeff_add,
  input  logic signed [COEF_W-1:0] coef_in,
  // sample stream
  input  logic                     valid,
  input  logic signed [DATA_W-1:0] x,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] d_out
);

  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(TAPS);

  logic signed [COEF_W-1:0] b    [TAPS];  // coefficients
  logic signed [DATA_W-1:0] z    [TAPS];  // delay line, z[k] = x(n-k)
  logic signed [PROD_W-1:0] prod [TAPS];  // combinational tap products
  logic signed [PROD_W-1:0] temp [TAPS];  // registered tap products
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  scaled;
  logic signed [DATA_W-1:0] sat;
  logic                     v_line;   // delay line took a sample last edge
  logic                     v_prod;   // temp holds that sample's products

  // Coefficient registers.
  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < TAPS; k++) b[k] <= '0;
    end else if (coef_we && (int'(coeff_add) < TAPS)) begin
      b[coeff_add] <= coef_in;
    end
  end

  // Tapped delay line.
  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < TAPS; k++) z[k] <= '0;
    end else if (valid) begin
      z[0] <= x;
      for (int k = 1; k < TAPS; k++) z[k] <= z[k-1];
    end
  end

  // Multiplier-free tap products.
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    shift_add_mult #(.A_W(DATA_W), .B_W(COEF_W)) u_mult (
      .a (z[k]),
      .b (b[k]),
      .p (prod[k])
    );
  end

  // Product registers and accumulator.
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc = acc + ACC_W'(temp[k]);
    scaled = acc >>> OUT_SHIFT;
    if (scaled > ACC_W'(signed'({1'b0, {(DATA_W-1){1'b1}}})))
      sat = {1'b0, {(DATA_W-1){1'b1}}};
    else if (scaled < -ACC_W'(signed'({1'b0, {(DATA_W-1){1'b1}}})) - 1)
      sat = {1'b1, {(DATA_W-1){1'b0}}};
    else
      sat = scaled[DATA_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int k = 0; k < TAPS; k++) temp[k] <= '0;
      v_line    <= 1'b0;
      v_prod    <= 1'b0;
      out_valid <= 1'b0;
      d_out     <= '0;
    end else begin
      v_line    <= valid;
      v_prod    <= v_line;
      out_valid <= v_prod;
      if (v_line) for (int k = 0; k < TAPS; k++) temp[k] <= prod[k];
      if (v_prod) d_out <= sat;
    end
  end

endmodule
