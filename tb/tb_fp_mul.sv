// tb_fp_mul: self-checking test of the single-precision multiplier.
//
// Reference: each operand is widened exactly to a double, the two doubles are
// multiplied (exact, since 24 x 24 significand bits fit in 53), and the double
// product is rounded back to single precision (to nearest, ties to even) by
// the testbench's own bit-level code. Operands stream in one per cycle; every
// result must appear exactly one cycle later. Directed cases cover zero,
// normalisation, rounding carry, overflow, underflow, infinity and NaN; the
// rest are random, over the whole exponent range.
module tb_fp_mul;
  import fppe_pkg::*;

  logic      clk = 1'b0, rst, in_valid, out_valid;
  fp32_t     x, y, z;
  fp_flags_t flags;
  int        checks = 0, failures = 0;
  int        n_ovf = 0, n_unf = 0, n_zero = 0, n_inv = 0, n_norm = 0;

  fp_mul dut (.clk, .rst, .in_valid, .x, .y, .out_valid, .z, .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] to_double(logic [31:0] f);
    return {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
  endfunction

  // Reference product and flags.
  function automatic void reference(input logic [31:0] a, input logic [31:0] b,
                                    output logic [31:0] res, output logic [3:0] fl);
    logic        s, a_zero, b_zero, a_spec, b_spec, a_nan, b_nan, g, st, up;
    logic [63:0] d;
    logic [23:0] f;
    int          e;
    real         r;
    s      = a[31] ^ b[31];
    a_zero = (a[30:23] == 8'h00);  b_zero = (b[30:23] == 8'h00);
    a_spec = (a[30:23] == 8'hFF);  b_spec = (b[30:23] == 8'hFF);
    a_nan  = a_spec && (a[22:0] != 0);
    b_nan  = b_spec && (b[22:0] != 0);
    fl = 4'b0000;  // {overflow, underflow, zero, invalid}
    if (a_nan || b_nan || (a_spec && b_zero) || (b_spec && a_zero)) begin
      res = 32'h7FC00000; fl = 4'b0001;
    end else if (a_spec || b_spec) begin
      res = {s, 8'hFF, 23'h0}; fl = 4'b0001;
    end else if (a_zero || b_zero) begin
      res = {s, 31'h0}; fl = 4'b0010;
    end else begin
      r = $bitstoreal(to_double(a)) * $bitstoreal(to_double(b));
      d = $realtobits(r);
      e  = int'(d[62:52]) - 1023 + 127;
      f  = {1'b0, d[51:29]};
      g  = d[28];
      st = |d[27:0];
      up = g && (st || f[0]);
      f  = f + 24'(up);
      if (f[23]) e++;
      if (e >= 255)      begin res = {s, 8'hFF, 23'h0}; fl = 4'b1000; end
      else if (e <= 0)   begin res = {s, 31'h0};        fl = 4'b0100; end
      else                     res = {s, 8'(e), f[22:0]};
    end
  endfunction

  logic [31:0] exp_z[$];
  logic [3:0]  exp_f[$];

  task automatic issue(logic [31:0] a, logic [31:0] b);
    logic [31:0] res;
    logic [3:0]  fl;
    x = a; y = b; in_valid = 1'b1;
    reference(a, b, res, fl);
    exp_z.push_back(res);
    exp_f.push_back(fl);
    if (((48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]})) >> 47) != 0 && fl == 4'b0000) n_norm++;
    @(posedge clk); #1;
  endtask

  // Checker: every cycle with out_valid must match the next expected result,
  // and out_valid must follow in_valid by exactly one cycle.
  logic in_valid_d = 1'b0;
  always @(posedge clk) begin
    #2;
    if (!rst) begin
      checks++;
      if (out_valid !== in_valid_d) begin
        failures++;
        $display("FAIL out_valid=%0b, in_valid one cycle earlier=%0b", out_valid, in_valid_d);
      end
      if (out_valid && exp_z.size() > 0) begin
        checks++;
        if (z !== exp_z[0] || flags !== exp_f[0]) begin
          failures++;
          if (failures < 20) $display("FAIL z=%h flags=%b expected %h %b", z, flags, exp_z[0], exp_f[0]);
        end
        if (flags.overflow)  n_ovf++;
        if (flags.underflow) n_unf++;
        if (flags.zero)      n_zero++;
        if (flags.invalid)   n_inv++;
        void'(exp_z.pop_front());
        void'(exp_f.pop_front());
      end
    end
  end
  always @(posedge clk) in_valid_d <= rst ? 1'b0 : in_valid;

  initial begin
    rst = 1'b1; in_valid = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    issue(32'h3F800000, 32'h3F800000);  // 1 * 1
    issue(32'h3FC00000, 32'h3FC00000);  // 1.5 * 1.5 = 2.25, normalisation shift
    issue(32'hC0400000, 32'h40000000);  // -3 * 2
    issue(32'h3FB50F52, 32'h3FB4FA95);  // just below 2.0, rounds up: carry into the exponent
    issue(32'h3F800001, 32'h3F800001);  // tiny rounding
    issue(32'h00000000, 32'h40490FDB);  // zero
    issue(32'h80000000, 32'h40490FDB);  // negative zero
    issue(32'h7F000000, 32'h7F000000);  // overflow
    issue(32'h00800000, 32'h00800000);  // underflow
    issue(32'h7F800000, 32'h3F800000);  // infinity
    issue(32'h7F800000, 32'h00000000);  // inf * 0 = NaN
    issue(32'h7FC00000, 32'h3F800000);  // NaN
    in_valid = 1'b0;
    @(posedge clk); #1;
    for (int i = 0; i < 20000; i++) begin
      issue($urandom, $urandom);
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        @(posedge clk); #1;
      end
    end
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #3;
    checks++;
    if (exp_z.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_z.size());
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_zero == 0 || n_inv == 0 || n_norm == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d zero=%0d inv=%0d norm=%0d", n_ovf, n_unf, n_zero, n_inv, n_norm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
