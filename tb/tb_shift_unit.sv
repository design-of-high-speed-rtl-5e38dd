// tb_shift_unit: self-checking test of the one-bit ALU shifter.
// For random operands and both carry-in values, every shift type is compared
// with a reference computed by integer multiplication/division by two; a
// 16-step chain of rotates through carry must bring the operand back.
module tb_shift_unit;
  import fppe_pkg::*;
  localparam int unsigned WIDTH = 16;

  logic [WIDTH-1:0] operand, result;
  shift_op_t        op;
  logic             carry_in, carry_out;
  int               checks = 0, failures = 0;

  shift_unit #(.WIDTH(WIDTH)) dut (.operand, .op, .carry_in, .result, .carry_out);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void reference(input int v, input shift_op_t o, input int ci,
                                    output int r, output int co);
    int top = 1 << WIDTH, half = 1 << (WIDTH - 1);
    int msb = (v >= half) ? 1 : 0, lsb = v % 2;
    case (o)
      SH_LSL: begin r = (v * 2) % top;           co = msb; end
      SH_LSR: begin r = v / 2;                   co = lsb; end
      SH_ASR: begin r = v / 2 + msb * half;      co = lsb; end
      SH_ROL: begin r = (v * 2) % top + msb;     co = msb; end
      SH_ROR: begin r = v / 2 + lsb * half;      co = lsb; end
      SH_RCL: begin r = (v * 2) % top + ci;      co = msb; end
      SH_RCR: begin r = v / 2 + ci * half;       co = lsb; end
      default: begin r = v;                      co = ci;  end
    endcase
  endfunction

  initial begin
    int r, co;
    logic [WIDTH-1:0] start;
    logic             c;
    for (int n = 0; n < 3000; n++) begin
      operand = WIDTH'($urandom);
      if (n == 0) operand = '0;
      if (n == 1) operand = '1;
      for (int o = 0; o < 8; o++) begin
        for (int ci = 0; ci < 2; ci++) begin
          op = shift_op_t'(o); carry_in = ci[0];
          #1;
          reference(int'(operand), op, ci, r, co);
          checks++;
          if (result !== WIDTH'(r) || carry_out !== co[0]) begin
            failures++;
            if (failures < 20) $display("FAIL op=%0d v=%h ci=%0d: %h/%0b expected %h/%0d",
                                        o, operand, ci, result, carry_out, WIDTH'(r), co);
          end
        end
      end
    end
    // WIDTH+1 rotates through carry restore operand and carry
    start = 16'hA5C3; c = 1'b1;
    operand = start; carry_in = c; op = SH_RCL;
    for (int i = 0; i <= WIDTH; i++) begin
      #1;
      operand = result; carry_in = carry_out;
    end
    #1;
    checks++;
    if (operand !== start || carry_in !== c) begin
      failures++;
      $display("FAIL rotate-through-carry chain: %h/%0b", operand, carry_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
