// ga_fa - one-bit full adder (the F521 cell of the gate array's adder tree).
// Combinational: {cout, s} = a + b + cin.
module ga_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
