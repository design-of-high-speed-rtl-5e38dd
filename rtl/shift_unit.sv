// shift_unit: one-bit shifter of the ALU, with carry out.
//
// Each operation moves the operand by one bit position. The bit shifted out
// of the operand appears on carry_out; the bit shifted into the vacated
// position depends on the shift type (see fppe_pkg::shift_op_t): zero for the
// logical shifts, the sign bit for the arithmetic right shift, the bit that
// left at the other end for the rotates, and carry_in for the rotates through
// carry. The single-bit shift with carry out, and a fill bit that depends on
// the type, follow the design's description of its ALU shifts; the set of
// seven types and their encoding are this design's choice. A multi-bit
// (barrel) shift is done by repeating the one-bit operation.
//
// Purely combinational. An unused op code passes the operand through with
// carry_out = carry_in.
module shift_unit
  import fppe_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] operand,
  input  shift_op_t        op,
  input  logic             carry_in,
  output logic [WIDTH-1:0] result,
  output logic             carry_out
);

  logic msb, lsb;

  always_comb begin
    msb = operand[WIDTH-1];
    lsb = operand[0];
    unique case (op)
      SH_LSL:  begin result = {operand[WIDTH-2:0], 1'b0};     carry_out = msb; end
      SH_LSR:  begin result = {1'b0, operand[WIDTH-1:1]};     carry_out = lsb; end
      SH_ASR:  begin result = {msb, operand[WIDTH-1:1]};      carry_out = lsb; end
      SH_ROL:  begin result = {operand[WIDTH-2:0], msb};      carry_out = msb; end
      SH_ROR:  begin result = {lsb, operand[WIDTH-1:1]};      carry_out = lsb; end
      SH_RCL:  begin result = {operand[WIDTH-2:0], carry_in}; carry_out = msb; end
      SH_RCR:  begin result = {carry_in, operand[WIDTH-1:1]}; carry_out = lsb; end
      default: begin result = operand;                        carry_out = carry_in; end
    endcase
  end

endmodule
