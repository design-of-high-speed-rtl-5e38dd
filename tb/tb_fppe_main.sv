// tb_fppe_main: self-checking test of the FPPE datapath.
//
// Random operand sets are loaded one per cycle (with random gaps). After the
// load edge, sum/sum_cout must equal a + b (16-bit wrap, carry out), and one
// edge later product must equal sum * c as signed integers, with
// product_valid high in exactly that cycle. Registers must hold when load is
// low. The divider stage is then run on random operands, including a zero
// divisor, and must finish in 16 cycles with the integer quotient/remainder.
module tb_fppe_main;
  localparam int unsigned WIDTH = 16;

  logic                      clk = 1'b0, rst, load, product_valid, sum_cout;
  logic signed [WIDTH-1:0]   a, b, c, sum;
  logic signed [2*WIDTH-1:0] product;
  logic                      div_enable, div_busy, div_done;
  logic [WIDTH-1:0]          div_dividend, div_divisor, div_q, div_r;
  int                        checks = 0, failures = 0, n_carry = 0;

  fppe_main #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH:0]            full;
    logic signed [2*WIDTH-1:0] pending_p;
    bit                        pending;
    int                        cycles;
    rst = 1'b1; load = 1'b0; a = '0; b = '0; c = '0;
    div_enable = 1'b0; div_dividend = '0; div_divisor = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    pending = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      load = ($urandom_range(0, 3) != 0);
      a = WIDTH'($urandom); b = WIDTH'($urandom); c = WIDTH'($urandom);
      if (i % 100 == 0) begin a = 16'h7FFF; b = 16'h7FFF; c = 16'h8000; end
      @(posedge clk); #1;
      // product of the set loaded one edge earlier
      checks++;
      if (product_valid !== pending || (pending && product !== pending_p)) begin
        failures++;
        if (failures < 20) $display("FAIL product=%0d valid=%0b expected %0d valid=%0b",
                                    product, product_valid, pending_p, pending);
      end
      if (load) begin
        full = {1'b0, a} + {1'b0, b};
        checks++;
        if (sum !== signed'(full[WIDTH-1:0]) || sum_cout !== full[WIDTH]) begin
          failures++;
          if (failures < 20) $display("FAIL %0d + %0d: sum=%0d cout=%0b", a, b, sum, sum_cout);
        end
        if (full[WIDTH]) n_carry++;
        pending_p = (2*WIDTH)'(longint'(signed'(full[WIDTH-1:0])) * longint'(c));
      end
      pending = load;
    end
    load = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (product_valid !== pending || (pending && product !== pending_p)) begin
      failures++;
      $display("FAIL last product");
    end
    checks++;
    if (n_carry == 0) begin
      failures++;
      $display("FAIL Adder1 carry-out never seen");
    end

    // Divider stage
    for (int i = 0; i < 300; i++) begin
      div_dividend = WIDTH'($urandom);
      div_divisor  = (i % 50 == 0) ? '0 : WIDTH'($urandom_range(1, (i % 2 == 1) ? 300 : 65535));
      div_enable   = 1'b1;
      @(posedge clk); #1;
      div_enable = 1'b0;
      cycles = 0;
      while (!div_done && cycles < 100) begin @(posedge clk); #1; cycles++; end
      checks++;
      if (cycles != WIDTH ||
          div_q !== ((div_divisor == 0) ? '1 : div_dividend / div_divisor) ||
          div_r !== ((div_divisor == 0) ? div_dividend : div_dividend % div_divisor)) begin
        failures++;
        if (failures < 20) $display("FAIL %0d / %0d: q=%0d r=%0d after %0d cycles",
                                    div_dividend, div_divisor, div_q, div_r, cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
