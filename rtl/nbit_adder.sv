// nbit_adder: N-bit binary adder with carry in and carry out.
//
// {carry, sum} = a + b + cin. This is the "N bit Addition" box of the Vedic
// combine network; its pins (a, b, cin, sum, carry) follow the 16-bit adder
// of the reference schematic. The adder architecture is left to synthesis
// (one behavioural addition). Purely combinational.
module nbit_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         carry
);
  assign {carry, sum} = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
endmodule
