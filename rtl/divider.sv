// divider: WIDTH-bit unsigned integer divider, quotient and remainder.
//
// The Divider that ends the FPPE datapath, with its ports dividend, divisor,
// clk, enable, q and r. The design names only the block and its ports; the
// algorithm is this design's choice: a sequential restoring divider that
// retires one quotient bit per clock cycle, so it costs one subtractor and
// three WIDTH-bit registers.
//
// Timing: a rising clk edge with enable high while the divider is idle loads
// the operands and raises busy. WIDTH edges later busy falls and done is high
// for one cycle, with q = dividend / divisor and r = dividend % divisor held
// until the next start. enable is ignored while busy. Division by zero gives
// q = all ones and r = dividend. rst is synchronous, active high.
module divider #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] r
);

  localparam int unsigned CNT_W = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] rem_q, quo_q, dvs_q;
  logic [CNT_W-1:0] cnt_q;
  logic [WIDTH:0]   rem_sh;   // partial remainder shifted left, one extra bit
  logic [WIDTH-1:0] diff;
  logic             fits;

  always_comb begin
    rem_sh = {rem_q, quo_q[WIDTH-1]};
    diff   = rem_sh[WIDTH-1:0] - dvs_q;  // exact whenever fits is set
    fits   = (rem_sh >= {1'b0, dvs_q});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rem_q <= '0;
      quo_q <= '0;
      dvs_q <= '0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (enable) begin
          busy  <= 1'b1;
          rem_q <= '0;
          quo_q <= dividend;
          dvs_q <= divisor;
          cnt_q <= CNT_W'(WIDTH);
        end
      end else begin
        rem_q <= fits ? diff : rem_sh[WIDTH-1:0];
        quo_q <= {quo_q[WIDTH-2:0], fits};
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // done marks the end of a division: the divider is idle again.
  a_done_idle : assert property (@(posedge clk) disable iff (rst) done |-> !busy);

  assign q = quo_q;
  assign r = rem_q;

endmodule
