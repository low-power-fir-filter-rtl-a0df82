// approx5_fa -- fifth approximate full adder cell.
//
// The cell drops the sum and carry logic of a full adder entirely: the sum
// output copies operand B and the carry output copies operand A, so the carry
// input is not used. Against the exact full adder this is wrong in four of the
// eight input cases for Sum (A,B,Cin = 001, 011, 100, 110) and in two for Cout
// (011, 100). In silicon the cell is a few transistors (buffers); here only
// its logic function is modelled. After synthesis both outputs are plain
// wires from the inputs: that is the whole saving the approximation buys, not
// a missing implementation.
//
// Ports: a, b, cin in; sum, cout out. Purely combinational.
// The function Sum = B, Cout = A is the published one. Keeping a cin port, so the
// cell drops in wherever an exact full adder sits, is this design's choice.
module approx5_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  // cin is part of the full-adder interface but the approximation ignores it.
  logic unused_cin;
  assign unused_cin = cin;

  assign sum  = b;
  assign cout = a;
endmodule
