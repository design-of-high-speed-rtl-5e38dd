// tb_fold_adder: self-checking test of the folded three-operand adder.
// A new random sample (a, b, c) is presented every two cycles, starting in
// slot 2l+0. Each sum must appear on y, with y_valid, exactly two cycles
// after its first slot, and y_valid must never be high in slot 2l+1.
module tb_fold_adder;
  localparam int unsigned WIDTH = 16;

  logic                    clk = 1'b0, rst;
  logic signed [WIDTH-1:0] a, b, c;
  logic                    slot, y_valid;
  logic signed [WIDTH+1:0] y;
  int                      checks = 0, failures = 0;

  fold_adder #(.WIDTH(WIDTH)) dut (.clk, .rst, .a, .b, .c, .slot, .y, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expected_sum[$];
  int due_cycle[$];

  initial begin
    int cyc, results;
    rst = 1'b1; a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    results = 0;
    for (cyc = 0; cyc < 4000; cyc++) begin
      // slot seen by the block during this cycle
      checks++;
      if (slot !== cyc[0]) begin
        failures++;
        $display("FAIL cycle %0d: slot=%0b", cyc, slot);
      end
      if (cyc[0] == 1'b0) begin
        a = WIDTH'($urandom); b = WIDTH'($urandom); c = WIDTH'($urandom);
        if (cyc % 64 == 0) begin  // extremes: most negative and most positive sums
          a = {1'b1, {(WIDTH-1){1'b0}}}; b = a; c = a;
        end else if (cyc % 64 == 2) begin
          a = {1'b0, {(WIDTH-1){1'b1}}}; b = a; c = a;
        end
        expected_sum.push_back(int'(a) + int'(b) + int'(c));
        due_cycle.push_back(cyc + 2);
      end
      if (y_valid) begin
        checks++;
        if (due_cycle.size() == 0 || due_cycle[0] != cyc) begin
          failures++;
          $display("FAIL cycle %0d: unexpected y_valid", cyc);
        end else begin
          void'(due_cycle.pop_front());
          if (int'(y) != expected_sum[0]) begin
            failures++;
            $display("FAIL cycle %0d: y=%0d expected %0d", cyc, y, expected_sum[0]);
          end
          void'(expected_sum.pop_front());
          results++;
        end
      end else if (due_cycle.size() != 0 && due_cycle[0] == cyc) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d: result missing", cyc);
        void'(due_cycle.pop_front());
        void'(expected_sum.pop_front());
      end
      @(posedge clk); #1;
    end
    checks++;
    if (results < 1990) begin
      failures++;
      $display("FAIL only %0d results", results);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
