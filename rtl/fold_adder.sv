// fold_adder: three-operand addition y(n) = a(n) + b(n) + c(n) folded onto a
// single adder with folding factor 2.
//
// The unfolded form is a chain of two adders. Here one adder and one delay
// register D are time-shared over two clock cycles per sample, called slots
// 2l+0 and 2l+1:
//   slot 2l+0: the adder takes a(n) and b(n);         D <= a(n) + b(n)
//   slot 2l+1: the adder takes D (fed back) and c(n); D <= D + c(n)
// The output switch closes in slot 2l+0, when D holds the finished sum of the
// previous sample: y = D, y_valid = 1. So a sample enters over slots 2l+0 and
// 2l+1 and its sum is presented in the following slot 2l+0 (latency 2 clock
// cycles from the first slot, one result every 2 cycles).
//
// Interface: the block owns the slot counter and reports it on `slot`
// (0 = 2l+0, 1 = 2l+1); a source holds a, b, c for both slots of a sample, or
// at least presents a and b in slot 0 and c in slot 1. rst is synchronous,
// active high, and restarts at slot 2l+0 with y_valid low until the first
// sum is complete.
//
// The schedule (which operand enters in which slot, where the output is
// sampled) follows the design's folding diagram. Operand width, signed
// arithmetic and the two guard bits on D are this design's choices.
module fold_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic signed [WIDTH-1:0] c,
  output logic                    slot,
  output logic signed [WIDTH+1:0] y,
  output logic                    y_valid
);

  localparam int unsigned DW = WIDTH + 2;  // room for the sum of three operands

  logic signed [DW-1:0] d_q;        // the delay element D
  logic signed [DW-1:0] add_x;      // adder input from the a / feedback switch
  logic signed [DW-1:0] add_y;      // adder input from the b / c switch
  logic signed [DW-1:0] add_s;
  logic                 primed_q;   // D holds a complete sum

  // Input switches, driven by the slot.
  always_comb begin
    if (slot == 1'b0) begin
      add_x = DW'(a);
      add_y = DW'(b);
    end else begin
      add_x = d_q;
      add_y = DW'(c);
    end
    add_s = add_x + add_y;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot     <= 1'b0;
      d_q      <= '0;
      primed_q <= 1'b0;
    end else begin
      slot <= ~slot;
      d_q  <= add_s;
      if (slot == 1'b1) primed_q <= 1'b1;
    end
  end

  // Output switch: closed in slot 2l+0.
  assign y       = d_q;
  assign y_valid = primed_q && (slot == 1'b0);

  // The output switch is only ever closed in slot 2l+0.
  a_valid_in_slot0 : assert property (@(posedge clk) disable iff (rst) y_valid |-> (slot == 1'b0));

endmodule
