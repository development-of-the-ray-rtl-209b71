// ga_ripple - W-bit ripple-carry adder built from full adders.
//
// With W = 2 it is block 'Add2' of the gate array (two F521 cells), with W = 3
// block 'Add3'.  The carry input takes one ray directly, which is how the
// adder tree counts 31 rays with 5 output bits.  Combinational:
// s = a + b + cin, W+1 bits wide.
module ga_ripple #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   s
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    ga_fa u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign s[W] = c[W];
endmodule
