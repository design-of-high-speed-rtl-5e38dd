// tb_register_block: self-checking test of the operand register.
// Random load/hold sequences are compared with a shadow copy kept by the
// testbench; synchronous reset is checked to clear the register.
module tb_register_block;
  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0, rst, load;
  logic [WIDTH-1:0] d, q, model;
  int               checks = 0, failures = 0;

  register_block #(.WIDTH(WIDTH)) dut (.clk, .rst, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model);
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; d = '0; model = '0;
    @(posedge clk); #1; check("reset");
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      load = ($urandom_range(0, 2) == 0);
      d    = WIDTH'($urandom);
      @(posedge clk);
      if (load) model = d;
      #1; check("load/hold");
    end
    rst = 1'b1; load = 1'b1; d = 16'hBEEF;
    @(posedge clk); model = '0; #1; check("reset over load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
