// adder16: W-bit binary adder with carry in and carry out, three of which
// sum the four products of the filter.
//
// s = (a + b + cin) mod 2^W and cout is the carry out of the top bit. The
// adder width is the published one. In the filter every carry in is 0 and
// the carry outs are not used, so the filter output wraps modulo 2^16.
//
// Interface: a, b (W bits), cin in; s (W bits), cout out. Combinational.
module adder16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  assign {cout, s} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};

endmodule
