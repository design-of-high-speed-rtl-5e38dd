// tb_shift_add_mult: self-checking test of the multiplier-free signed
// product. Corner values (0, +/-1, most negative, most positive) and random
// operands are compared with the integer product.
module tb_shift_add_mult;
  localparam int unsigned A_W = 16, B_W = 16;

  logic signed [A_W-1:0]     a;
  logic signed [B_W-1:0]     b;
  logic signed [A_W+B_W-1:0] p;
  int                        checks = 0, failures = 0;

  shift_add_mult #(.A_W(A_W), .B_W(B_W)) dut (.a, .b, .p);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint ia, longint ib);
    longint expected;
    a = A_W'(ia); b = B_W'(ib);
    #1;
    expected = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != expected) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", a, b, expected, p);
    end
  endtask

  initial begin
    longint corner[6] = '{0, 1, -1, -32768, 32767, 12345};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    for (int n = 0; n < 20000; n++) check(longint'($urandom), longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
