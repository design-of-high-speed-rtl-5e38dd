// shift_add_mult: multiplier-free signed product, a * b, from shifts and adds.
//
// The filter taps are formed without a multiplier cell: each bit b[i] of the
// multiplier operand selects a copy of the sign-extended multiplicand a
// shifted left by i, and the selected copies are summed. The most significant
// bit of b carries negative weight (two's complement), so its copy is
// subtracted instead of added. The result is exact: P_W = A_W + B_W bits.
//
// Purely combinational. The shift-and-add idea follows the design's
// "adder and shifter followed with accumulator" description; the two's
// complement handling of the last partial product is this design's choice.
module shift_add_mult #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16,
  parameter int unsigned P_W = A_W + B_W
) (
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  output logic signed [P_W-1:0] p
);

  logic signed [P_W-1:0] a_ext;
  logic signed [P_W-1:0] acc;

  assign a_ext = P_W'(a);  // sign extension of the multiplicand

  always_comb begin
    acc = '0;
    for (int unsigned i = 0; i < B_W; i++) begin
      if (b[i]) begin
        if (i == B_W - 1) acc = acc - (a_ext <<< i);
        else              acc = acc + (a_ext <<< i);
      end
    end
    p = acc;
  end

endmodule
