// mirror_adder_fa -- exact full adder in the mirror-adder organisation.
//
// The mirror adder first forms the inverted carry Cout' and then reuses it to
// form the inverted sum: Sum' is low when A, B and Cin are all 1, or when the
// carry is 0 and at least one input is 1. The RTL follows the same carry-first
// order, which yields the exact full-adder function
//   Sum  = A xor B xor Cin,  Cout = AB + ACin + BCin.
//
// Ports: a, b, cin in; sum, cout out. Purely combinational.
// The Boolean function is the published one; the transistor level (sizing,
// power) is not modelled.
module mirror_adder_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic cout_n;  // first stage: inverted carry
  logic sum_n;   // second stage: inverted sum, built from cout_n

  always_comb begin
    cout_n = ~((a & b) | (cin & (a | b)));
    sum_n  = ~((a & b & cin) | (cout_n & (a | b | cin)));
    sum    = ~sum_n;
    cout   = ~cout_n;
  end
endmodule
