// tb_fppe_fir_top: end-to-end test of the whole design at its default sizes.
//
// Four streams run at the same time, one per unit, each against its own
// reference model:
//   - FIR filter: 51 coefficients loaded through the port (plus an ignored
//     out-of-range write), then a filtered stream of random samples and a
//     full-scale burst; outputs must match the convolution sum >> 15,
//     saturated, exactly two edges after their sample.
//   - folded adder: one sample per two cycles, sum due two cycles later.
//   - ALU shift unit: every shift type on random operands, checked against
//     multiplication/division by two.
//   - floating-point multiplier: one product per cycle, result one edge later,
//     rounded reference computed in double precision.
//   - FPPE datapath: operand sets loaded, sum and product checked; divider runs
//     on the product's magnitude bits, including a zero divisor.
// Every mechanism is counted (FIR saturation high/low, ignored coefficient
// write, fold results, each shift type, FP normalisation shift, rounding carry, overflow,
// underflow, zero, invalid, Adder1 carry-out, division by zero, start ignored
// while busy); one that never happened counts as a failure.
module tb_fppe_fir_top;
  import fppe_pkg::*;
  localparam int TAPS = FIR_TAPS;

  logic                         clk = 1'b0, rst;
  logic                         fir_coef_we, fir_valid, fir_out_valid;
  logic [FIR_ADDR_W-1:0]        fir_coeff_add;
  logic signed [FIR_COEF_W-1:0] fir_coef_in;
  logic signed [FIR_DATA_W-1:0] fir_x, fir_d_out;
  logic signed [15:0]           fold_a, fold_b, fold_c;
  logic                         fold_slot, fold_y_valid;
  logic signed [17:0]           fold_y;
  logic [15:0]                  sh_operand, sh_result;
  shift_op_t                    sh_op;
  logic                         sh_carry_in, sh_carry_out;
  logic                         fpm_in_valid, fpm_out_valid;
  fp32_t                        fpm_x, fpm_y, fpm_z;
  fp_flags_t                    fpm_flags;
  logic                         pe_load, pe_sum_cout, pe_product_valid;
  logic signed [15:0]           pe_a, pe_b, pe_c, pe_sum;
  logic signed [31:0]           pe_product;
  logic                         pe_div_enable, pe_div_busy, pe_div_done;
  logic [15:0]                  pe_div_dividend, pe_div_divisor, pe_div_q, pe_div_r;

  fppe_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;   // edges seen, counted at #2 after each edge
  always @(posedge clk) #2 cyc++;

  // mechanism counters
  int n_fir_out = 0, n_sat_hi = 0, n_sat_lo = 0, n_coef_ignored = 0;
  int n_fold = 0;
  int n_shift_op[8];
  int n_fp = 0, n_fp_norm = 0, n_fp_rcarry = 0, n_fp_ovf = 0, n_fp_unf = 0, n_fp_zero = 0, n_fp_inv = 0;
  int n_pe = 0, n_pe_carry = 0, n_div = 0, n_div0 = 0, n_div_busy_start = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ FIR stream
  longint coef[TAPS];
  longint hist[TAPS];
  longint fir_exp[$];
  int     fir_due[$];

  always @(posedge clk) begin
    #3;
    if (fir_out_valid) begin
      if (fir_exp.size() == 0 || fir_due[0] != cyc) expect_true(0, "unexpected FIR output");
      else begin
        expect_true(longint'(fir_d_out) == fir_exp[0], $sformatf("FIR d_out=%0d expected %0d", fir_d_out, fir_exp[0]));
        if (fir_exp[0] == 32767)  n_sat_hi++;
        if (fir_exp[0] == -32768) n_sat_lo++;
        n_fir_out++;
        void'(fir_exp.pop_front()); void'(fir_due.pop_front());
      end
    end else if (fir_due.size() != 0 && fir_due[0] == cyc) begin
      expect_true(0, "FIR output missing");
      void'(fir_exp.pop_front()); void'(fir_due.pop_front());
    end
  end

  task automatic fir_write(int k, longint v);
    fir_coef_we = 1'b1; fir_coeff_add = FIR_ADDR_W'(k); fir_coef_in = FIR_COEF_W'(v);
    if (k < TAPS) coef[k] = v; else n_coef_ignored++;
    @(posedge clk); #1;
    fir_coef_we = 1'b0;
  endtask

  task automatic fir_sample(longint s);
    longint acc;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = s;
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += coef[k] * hist[k];
    acc = acc >>> 15;
    if (acc > 32767)  acc = 32767;
    if (acc < -32768) acc = -32768;
    fir_valid = 1'b1; fir_x = FIR_DATA_W'(s);
    fir_exp.push_back(acc);
    fir_due.push_back(cyc + 4);  // sampling edge counts as cyc+2 (cyc lags, updated at #2)
    @(posedge clk); #1;
    fir_valid = 1'b0;
  endtask

  task automatic fir_stream();
    // low-pass-like symmetric taps, Q1.15, positive gain < 1
    for (int k = 0; k < TAPS; k++) begin
      int d = (k < TAPS / 2) ? k : TAPS - 1 - k;
      fir_write(k, longint'(40 + 24 * d));
    end
    fir_write(TAPS, 32767);      // out of range: ignored
    fir_write(63, -1);           // out of range: ignored
    for (int i = 0; i < 600; i++) begin
      fir_sample(longint'($signed(16'($urandom))));
      if ($urandom_range(0, 4) == 0) begin @(posedge clk); #1; end
    end
    for (int k = 0; k < TAPS; k++) fir_write(k, 32767);
    for (int i = 0; i < 160; i++) fir_sample((i / 80) == 0 ? 32767 : -32768);
  endtask

  // --------------------------------------------------------- folded adder
  task automatic fold_stream();
    int exp_sum[$], due[$];
    // align to slot 2l+0
    while (fold_slot !== 1'b0) begin @(posedge clk); #1; end
    for (int i = 0; i < 800; i++) begin
      // cycle in slot 0: new operands
      fold_a = 16'($urandom); fold_b = 16'($urandom); fold_c = 16'($urandom);
      exp_sum.push_back(int'(fold_a) + int'(fold_b) + int'(fold_c));
      due.push_back(cyc + 2);
      if (fold_y_valid) begin
        expect_true(due[0] == cyc && int'(fold_y) == exp_sum[0], $sformatf("fold y=%0d expected %0d", fold_y, exp_sum[0]));
        void'(exp_sum.pop_front()); void'(due.pop_front());
        n_fold++;
      end
      @(posedge clk); #1;
      expect_true(fold_slot == 1'b1 && !fold_y_valid, "fold slot 2l+1 expected");
      @(posedge clk); #1;
    end
  endtask

  // ------------------------------------------------------- ALU shift unit
  task automatic shift_stream();
    int v, r, co;
    for (int i = 0; i < 800; i++) begin
      v = int'(16'($urandom));
      sh_operand = 16'(v); sh_op = shift_op_t'(i % 7); sh_carry_in = 1'($urandom);
      #1;
      case (sh_op)
        SH_LSL: begin r = (v * 2) % 65536;              co = v / 32768; end
        SH_LSR: begin r = v / 2;                        co = v % 2;     end
        SH_ASR: begin r = v / 2 + (v / 32768) * 32768;  co = v % 2;     end
        SH_ROL: begin r = (v * 2) % 65536 + v / 32768;  co = v / 32768; end
        SH_ROR: begin r = v / 2 + (v % 2) * 32768;      co = v % 2;     end
        SH_RCL: begin r = (v * 2) % 65536 + int'(sh_carry_in); co = v / 32768; end
        default: begin r = v / 2 + int'(sh_carry_in) * 32768; co = v % 2; end
      endcase
      expect_true(sh_result == 16'(r) && sh_carry_out == co[0],
                  $sformatf("shift op %0d of %h gave %h/%0b", sh_op, v, sh_result, sh_carry_out));
      n_shift_op[int'(sh_op)]++;
      @(posedge clk); #1;
    end
  endtask

  // ------------------------------------------- floating-point multiplier
  function automatic logic [63:0] to_double(logic [31:0] f);
    return {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'b0};
  endfunction

  logic [31:0] fp_exp[$];
  logic [3:0]  fp_fl[$];

  task automatic fp_issue(logic [31:0] a, logic [31:0] b);
    logic [63:0] d;
    logic [23:0] f;
    logic [31:0] res;
    logic [3:0]  fl;
    int          e;
    logic        s;
    s = a[31] ^ b[31];
    fl = 4'b0000;
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) begin
      // only infinities and NaNs with the other operand finite and non-zero are issued
      res = (a[22:0] != 0 && a[30:23] == 8'hFF) || (b[22:0] != 0 && b[30:23] == 8'hFF)
            ? 32'h7FC00000 : {s, 8'hFF, 23'h0};
      fl = 4'b0001;
    end else if (a[30:23] == 0 || b[30:23] == 0) begin
      res = {s, 31'h0}; fl = 4'b0010;
    end else begin
      d = $realtobits($bitstoreal(to_double(a)) * $bitstoreal(to_double(b)));
      if (((48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]})) >> 47) != 0) n_fp_norm++;
      e = int'(d[62:52]) - 1023 + 127;
      f = {1'b0, d[51:29]} + 24'(d[28] && ((|d[27:0]) || d[29]));
      if (f[23]) begin e++; n_fp_rcarry++; end
      if (e >= 255)    begin res = {s, 8'hFF, 23'h0}; fl = 4'b1000; end
      else if (e <= 0) begin res = {s, 31'h0};        fl = 4'b0100; end
      else             res = {s, 8'(e), f[22:0]};
    end
    fpm_x = a; fpm_y = b; fpm_in_valid = 1'b1;
    fp_exp.push_back(res); fp_fl.push_back(fl);
    @(posedge clk); #1;
    fpm_in_valid = 1'b0;
    expect_true(fpm_out_valid, "fp_mul out_valid one edge after in_valid");
    expect_true(fpm_z == fp_exp[0] && fpm_flags == fp_fl[0],
                $sformatf("fp %h*%h = %h/%b expected %h/%b", a, b, fpm_z, fpm_flags, fp_exp[0], fp_fl[0]));
    if (fpm_flags.overflow)  n_fp_ovf++;
    if (fpm_flags.underflow) n_fp_unf++;
    if (fpm_flags.zero)      n_fp_zero++;
    if (fpm_flags.invalid)   n_fp_inv++;
    n_fp++;
    void'(fp_exp.pop_front()); void'(fp_fl.pop_front());
  endtask

  task automatic fp_stream();
    fp_issue(32'h3FB50F52, 32'h3FB4FA95);   // just below 2.0, rounds up: carry into the exponent
    fp_issue(32'h7F800000, 32'h40000000);   // infinity
    fp_issue(32'h7FC00000, 32'h40000000);   // NaN
    for (int i = 0; i < 1500; i++) fp_issue($urandom, $urandom);
  endtask

  // ---------------------------------------------------------- FPPE datapath
  task automatic pe_stream();
    logic [16:0] full;
    logic signed [31:0] exp_p;
    for (int i = 0; i < 600; i++) begin
      pe_a = 16'($urandom); pe_b = 16'($urandom); pe_c = 16'($urandom);
      pe_load = 1'b1;
      @(posedge clk); #1;
      pe_load = 1'b0;
      full = {1'b0, pe_a} + {1'b0, pe_b};
      expect_true(pe_sum == signed'(full[15:0]) && pe_sum_cout == full[16], "FPPE Adder1 sum");
      if (full[16]) n_pe_carry++;
      exp_p = 32'(longint'(signed'(full[15:0])) * longint'(pe_c));
      @(posedge clk); #1;
      expect_true(pe_product_valid && pe_product == exp_p,
                  $sformatf("FPPE product %0d expected %0d", pe_product, exp_p));
      n_pe++;
      // Divider: dividend and divisor taken from the product's two halves
      if (i % 10 == 0) begin
        int cycles = 0;
        logic [15:0] n, d;
        n = pe_product[31:16];
        d = (i % 50 == 0) ? 16'd0 : pe_product[15:0];
        pe_div_dividend = n; pe_div_divisor = d; pe_div_enable = 1'b1;
        @(posedge clk); #1;
        // keep enable high one more cycle with other operands: must be ignored
        pe_div_dividend = ~n; n_div_busy_start += pe_div_busy ? 1 : 0;
        @(posedge clk); #1; cycles = 1;
        pe_div_enable = 1'b0;
        while (!pe_div_done && cycles < 40) begin @(posedge clk); #1; cycles++; end
        expect_true(cycles == 16 &&
                    pe_div_q == ((d == 0) ? 16'hFFFF : n / d) &&
                    pe_div_r == ((d == 0) ? n : n % d),
                    $sformatf("divider %0d/%0d gave q=%0d r=%0d in %0d cycles", n, d, pe_div_q, pe_div_r, cycles));
        if (d == 0) n_div0++;
        n_div++;
      end
    end
  endtask

  initial begin
    rst = 1'b1;
    fir_coef_we = 1'b0; fir_valid = 1'b0; fir_coeff_add = '0; fir_coef_in = '0; fir_x = '0;
    fold_a = '0; fold_b = '0; fold_c = '0;
    fpm_in_valid = 1'b0; fpm_x = '0; fpm_y = '0;
    sh_operand = '0; sh_op = SH_LSL; sh_carry_in = 1'b0;
    foreach (n_shift_op[k]) n_shift_op[k] = 0;
    pe_load = 1'b0; pe_a = '0; pe_b = '0; pe_c = '0;
    pe_div_enable = 1'b0; pe_div_dividend = '0; pe_div_divisor = '0;
    foreach (hist[k]) begin hist[k] = 0; coef[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    fork
      fir_stream();
      fold_stream();
      shift_stream();
      fp_stream();
      pe_stream();
    join
    repeat (5) @(posedge clk); #4;
    expect_true(fir_exp.size() == 0 && n_fir_out == 760, $sformatf("FIR outputs %0d of 760", n_fir_out));

    $display("FIR outputs %0d, saturated high %0d, low %0d, ignored coefficient writes %0d",
             n_fir_out, n_sat_hi, n_sat_lo, n_coef_ignored);
    $display("fold results %0d", n_fold);
    $display("shifts by type: %0d %0d %0d %0d %0d %0d %0d", n_shift_op[0], n_shift_op[1],
             n_shift_op[2], n_shift_op[3], n_shift_op[4], n_shift_op[5], n_shift_op[6]);
    for (int k = 0; k < 7; k++) expect_true(n_shift_op[k] > 0, $sformatf("shift type %0d never used", k));
    $display("fp products %0d: normalised %0d, rounding carry %0d, overflow %0d, underflow %0d, zero %0d, invalid %0d",
             n_fp, n_fp_norm, n_fp_rcarry, n_fp_ovf, n_fp_unf, n_fp_zero, n_fp_inv);
    $display("FPPE products %0d, Adder1 carry %0d, divisions %0d, by zero %0d, start while busy %0d",
             n_pe, n_pe_carry, n_div, n_div0, n_div_busy_start);
    expect_true(n_sat_hi > 0,         "FIR positive saturation never happened");
    expect_true(n_sat_lo > 0,         "FIR negative saturation never happened");
    expect_true(n_coef_ignored > 0,   "out-of-range coefficient write never happened");
    expect_true(n_fold >= 790,        "too few folded-adder results");
    expect_true(n_fp_norm > 0,        "FP normalisation shift never happened");
    expect_true(n_fp_rcarry > 0,      "FP rounding carry never happened");
    expect_true(n_fp_ovf > 0,         "FP overflow never happened");
    expect_true(n_fp_unf > 0,         "FP underflow never happened");
    expect_true(n_fp_zero > 0,        "FP zero operand never happened");
    expect_true(n_fp_inv > 0,         "FP infinity/NaN never happened");
    expect_true(n_pe_carry > 0,       "Adder1 carry-out never happened");
    expect_true(n_div0 > 0,           "division by zero never happened");
    expect_true(n_div_busy_start > 0, "start while busy never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
