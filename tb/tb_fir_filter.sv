// tb_fir_filter: self-checking test of the 51-tap FIR filter at its default
// size.
//
// Coefficients are written through the coefficient port, then random samples
// are streamed in, with random idle cycles. The testbench keeps its own
// sample history and computes each output as the integer convolution sum,
// shifted right by 15 and saturated to 16 bits. Each output must appear with
// out_valid exactly two cycles after the edge that took its sample. A second
// first coefficient set is kept within +/-2048 so that most outputs stay in
// range and exercise the arithmetic; a second coefficient set with large values drives the output into saturation, and
// both saturation directions must occur.
module tb_fir_filter;
  import fppe_pkg::*;
  localparam int TAPS = FIR_TAPS;

  logic                         clk = 1'b0, reset, coef_we, valid, out_valid;
  logic [FIR_ADDR_W-1:0]        coeff_add;
  logic signed [FIR_COEF_W-1:0] coef_in;
  logic signed [FIR_DATA_W-1:0] x, d_out;
  int                           checks = 0, failures = 0;
  int                           n_sat_hi = 0, n_sat_lo = 0, n_out = 0;

  fir_filter dut (.clk, .reset, .coef_we, .coeff_add, .coef_in, .valid, .x, .out_valid, .d_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint coef[TAPS];
  longint hist[TAPS];          // hist[k] = x(n-k)
  longint exp_y[$];
  int     due[$];
  int     cyc = 0;

  always @(posedge clk) begin
    #2;
    cyc++;
    if (out_valid) begin
      checks++;
      if (exp_y.size() == 0 || due[0] != cyc) begin
        failures++;
        $display("FAIL cycle %0d: unexpected out_valid", cyc);
      end else begin
        if (longint'(d_out) != exp_y[0]) begin
          failures++;
          if (failures < 20) $display("FAIL cycle %0d: d_out=%0d expected %0d", cyc, d_out, exp_y[0]);
        end
        if (exp_y[0] == 32767)  n_sat_hi++;
        if (exp_y[0] == -32768) n_sat_lo++;
        n_out++;
        void'(exp_y.pop_front());
        void'(due.pop_front());
      end
    end else if (due.size() != 0 && due[0] == cyc) begin
      checks++;
      failures++;
      $display("FAIL cycle %0d: output missing", cyc);
      void'(exp_y.pop_front());
      void'(due.pop_front());
    end
  end

  task automatic load_coefs(bit big);
    for (int k = 0; k < TAPS; k++) begin
      coef[k]   = big ? (($urandom_range(0, 1) == 1) ? 32767 : 30000) : (longint'($signed(16'($urandom))) >>> 4);
      coef_we   = 1'b1;
      coeff_add = FIR_ADDR_W'(k);
      coef_in   = FIR_COEF_W'(coef[k]);
      @(posedge clk); #1;
    end
    // writes beyond the last tap are ignored
    coeff_add = FIR_ADDR_W'(TAPS); coef_in = 16'h7FFF;
    @(posedge clk); #1;
    coef_we = 1'b0;
  endtask

  task automatic push_sample(longint s);
    longint acc;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = s;
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += coef[k] * hist[k];
    acc = acc >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    valid = 1'b1;
    x = FIR_DATA_W'(s);
    exp_y.push_back(acc);
    // cyc lags one edge here (the checker counts at #2): the sampling edge
    // will be counted as cyc+2, and the output is due two edges after it.
    due.push_back(cyc + 4);
    @(posedge clk); #1;
    valid = 1'b0;
  endtask

  initial begin
    reset = 1'b1; coef_we = 1'b0; valid = 1'b0; x = '0; coeff_add = '0; coef_in = '0;
    foreach (hist[k]) hist[k] = 0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    load_coefs(1'b0);
    for (int i = 0; i < 3000; i++) begin
      push_sample(longint'($signed(16'($urandom))));
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    repeat (4) @(posedge clk); #1;
    load_coefs(1'b1);
    for (int i = 0; i < 200; i++) push_sample((i / 60) % 2 == 0 ? 32767 : -32768);
    for (int i = 0; i < 200; i++) push_sample(longint'($signed(16'($urandom))));
    repeat (5) @(posedge clk); #3;
    checks++;
    if (exp_y.size() != 0 || n_out != 3400) begin
      failures++;
      $display("FAIL %0d outputs seen, %0d outstanding", n_out, exp_y.size());
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0 || n_out - n_sat_hi - n_sat_lo < 2000) begin
      failures++;
      $display("FAIL saturation not exercised: hi=%0d lo=%0d", n_sat_hi, n_sat_lo);
    end
    $display("saturated outputs: high %0d, low %0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
