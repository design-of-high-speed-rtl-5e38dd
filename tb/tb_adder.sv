// tb_adder: self-checking test of the WIDTH-bit adder with carry in/out.
// Exhaustive over a and b for both carry-in values at WIDTH = 8; the
// expected {cout, sum} is computed as an integer sum.
module tb_adder;
  localparam int unsigned WIDTH = 8;

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  int               checks = 0, failures = 0;

  adder #(.WIDTH(WIDTH)) dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_total;
    for (int ci = 0; ci < 2; ci++) begin
      for (int ia = 0; ia < (1 << WIDTH); ia++) begin
        for (int ib = 0; ib < (1 << WIDTH); ib++) begin
          a = WIDTH'(ia); b = WIDTH'(ib); cin = ci[0];
          #1;
          exp_total = ia + ib + ci;
          checks++;
          if ({cout, sum} !== (WIDTH+1)'(exp_total)) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d b=%0d cin=%0d got cout=%0b sum=%0d", ia, ib, ci, cout, sum);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
