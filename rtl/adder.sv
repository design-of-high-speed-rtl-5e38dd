// adder: WIDTH-bit binary adder with carry in and carry out.
//
// sum/cout = a + b + cin, purely combinational. This is the "Adder" of the
// FPPE datapath (Adder1 in the block chain), with the port names a, b, cin,
// sum and cout of that block. The plain ripple description is this design's
// choice; synthesis maps it to the target's carry logic.
module adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    {cout, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, cin};
  end

endmodule
