// tb_divider: self-checking test of the sequential divider.
// Random and corner operands (divisor 0 and 1, dividend 0, all ones) are
// divided; q and r are compared with the integer quotient and remainder and
// done must rise exactly WIDTH cycles after the start. A start request while
// busy must be ignored.
module tb_divider;
  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0, rst, enable, busy, done;
  logic [WIDTH-1:0] dividend, divisor, q, r;
  int               checks = 0, failures = 0;

  divider #(.WIDTH(WIDTH)) dut (.clk, .rst, .enable, .dividend, .divisor, .busy, .done, .q, .r);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(logic [WIDTH-1:0] n, logic [WIDTH-1:0] d);
    int cycles;
    logic [WIDTH-1:0] eq, er;
    dividend = n; divisor = d; enable = 1'b1;
    @(posedge clk); #1;
    enable = 1'b1;                      // stays high: must be ignored while busy
    dividend = ~n; divisor = d + 1'b1;
    cycles = 0;
    while (!done && cycles < 4 * WIDTH) begin
      @(posedge clk); #1;
      cycles++;
    end
    enable = 1'b0;
    eq = (d == 0) ? '1 : n / d;
    er = (d == 0) ? n  : n % d;
    checks++;
    if (!done || q !== eq || r !== er) begin
      failures++;
      $display("FAIL %0d / %0d: q=%0d r=%0d expected %0d %0d", n, d, q, r, eq, er);
    end
    checks++;
    if (cycles != WIDTH) begin
      failures++;
      $display("FAIL %0d / %0d took %0d cycles, expected %0d", n, d, cycles, WIDTH);
    end
    @(posedge clk); #1;
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done/busy not cleared after result");
    end
  endtask

  initial begin
    rst = 1'b1; enable = 1'b0; dividend = '0; divisor = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    divide(16'd100, 16'd7);
    divide(16'd0, 16'd5);
    divide(16'hFFFF, 16'd1);
    divide(16'hFFFF, 16'hFFFF);
    divide(16'd1234, 16'd0);
    divide(16'd5, 16'd9);
    for (int i = 0; i < 2000; i++) divide(WIDTH'($urandom), WIDTH'($urandom_range(0, 3) == 0 ? $urandom_range(1, 255) : $urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
