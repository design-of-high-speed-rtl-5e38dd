// fppe_main: the processing-element datapath of the FPPE:
//   Register Blocks 1-3 -> Adder1 -> Multiplier -> (Adder2, Adder3) -> Divider.
//
// Three register_block instances (RB1, RB2, RB3) capture the input operands
// a, b, c when load is high. Adder1 forms s = RB1 + RB2 with its carry-in tied
// to zero; the Multiplier forms p = s * RB3 with the multiplier-free
// shift_add_mult, and p is registered (MUL_W = 2*WIDTH bits, two's
// complement). The Divider (quotient and remainder, unsigned) is the last
// stage of the chain.
//
// What the design leaves open: it shows that Adder2 and Adder3 take the
// multiplier's result and feed the Divider, but not what they add. They are
// therefore not part of this module: p is brought out on `product`, and the
// Divider's operands come in on div_dividend / div_divisor, where Adder2's and
// Adder3's results would connect. The operand width, treating s and the
// operands as two's complement, dropping Adder1's carry-out from the product
// (it is brought out on sum_cout) and the register stage after the multiplier
// are this design's choices.
//
// Timing: a rising clk edge with load high captures a, b, c, and sum/sum_cout
// follow right after it; the next edge registers the product, which is then
// presented with product_valid high for one cycle (one operand set per
// cycle). The Divider
// starts on div_enable and reports div_done WIDTH edges later (see divider).
// rst is synchronous, active high.
module fppe_main #(
  parameter int unsigned WIDTH = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  // operand input ("Input Data")
  input  logic                      load,
  input  logic signed [WIDTH-1:0]   a,
  input  logic signed [WIDTH-1:0]   b,
  input  logic signed [WIDTH-1:0]   c,
  // Adder1 and Multiplier results
  output logic signed [WIDTH-1:0]   sum,
  output logic                      sum_cout,
  output logic                      product_valid,
  output logic signed [2*WIDTH-1:0] product,
  // Divider (operands from Adder2 / Adder3)
  input  logic                      div_enable,
  input  logic [WIDTH-1:0]          div_dividend,
  input  logic [WIDTH-1:0]          div_divisor,
  output logic                      div_busy,
  output logic                      div_done,
  output logic [WIDTH-1:0]          div_q,
  output logic [WIDTH-1:0]          div_r
);

  logic [WIDTH-1:0]         rb1_q, rb2_q, rb3_q;
  logic [WIDTH-1:0]         add1_sum;
  logic signed [2*WIDTH-1:0] mul_p;
  logic                     loaded_q;

  register_block #(.WIDTH(WIDTH)) u_rb1 (.clk, .rst, .load, .d(a), .q(rb1_q));
  register_block #(.WIDTH(WIDTH)) u_rb2 (.clk, .rst, .load, .d(b), .q(rb2_q));
  register_block #(.WIDTH(WIDTH)) u_rb3 (.clk, .rst, .load, .d(c), .q(rb3_q));

  adder #(.WIDTH(WIDTH)) u_add1 (
    .a    (rb1_q),
    .b    (rb2_q),
    .cin  (1'b0),
    .sum  (add1_sum),
    .cout (sum_cout)
  );

  shift_add_mult #(.A_W(WIDTH), .B_W(WIDTH)) u_mul (
    .a (signed'(add1_sum)),
    .b (signed'(rb3_q)),
    .p (mul_p)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      loaded_q      <= 1'b0;
      product_valid <= 1'b0;
      product       <= '0;
    end else begin
      loaded_q      <= load;
      product_valid <= loaded_q;
      if (loaded_q) product <= mul_p;
    end
  end

  assign sum = signed'(add1_sum);

  divider #(.WIDTH(WIDTH)) u_div (
    .clk,
    .rst,
    .enable   (div_enable),
    .dividend (div_dividend),
    .divisor  (div_divisor),
    .busy     (div_busy),
    .done     (div_done),
    .q        (div_q),
    .r        (div_r)
  );

endmodule
