// register_block: WIDTH-bit operand register with synchronous load enable.
//
// One of the three Register Blocks that capture the input data of the FPPE
// datapath. On a rising clk edge with load high, d is stored; otherwise q
// holds. rst (synchronous, active high) clears q. The block is only named in
// the design description; load enable and reset are this design's choice.
module register_block #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
