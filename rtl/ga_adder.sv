// ga_adder - block 'Adder' of the ray finder gate array: counts how many of the
// 31 rays are true and registers the 5-bit count (pins H1..H5, H1 = LSB).
//
// The count is a binary tree of small adders, so that the longest path stays
// short and the tree can be continued outside the chip:
//   level 1: 8 full adders, each adding 3 rays        -> 8 numbers of 2 bits
//   level 2: 4 two-bit adders (Add2), carry in a ray  -> 4 numbers of 3 bits
//   level 3: 2 three-bit adders (Add3), carry in a ray-> 2 numbers of 4 bits
//   level 4: one 4-bit adder, carry in a ray          -> 5 bits (0..31)
// 24 + 4 + 2 + 1 = 31 rays.  The five sum bits are sampled by flip-flops on
// the rising edge of AClk; h is therefore valid one AClk cycle after the rays.
//
// From the published schematics: the tree of full adders, Add2, Add3 and a
// 4-bit adder with output flip-flops, and ray 2 at the carry input of the last
// adder, and rays 1..7 at carry inputs.  Which ray enters which of the other
// carry inputs and full adders is this design's choice (the count does not
// depend on it), as is the asynchronous reset, added for simulation.
module ga_adder
  import rf_pkg::*;
(
  input  logic            aclk,
  input  logic            rst_n,
  input  logic [NRAY-1:0] ray,    // ray[0] is ray 1
  output logic [4:0]      h
);
  logic [1:0] l1 [8];
  logic [2:0] l2 [4];
  logic [3:0] l3 [2];
  logic [4:0] sum;

  // level 1: rays 8..31
  for (genvar k = 0; k < 8; k++) begin : g_l1
    ga_fa u_fa (.a(ray[7+3*k]), .b(ray[8+3*k]), .cin(ray[9+3*k]),
                .s(l1[k][0]), .cout(l1[k][1]));
  end
  // level 2: carry inputs rays 4..7
  for (genvar j = 0; j < 4; j++) begin : g_l2
    ga_ripple #(.W(2)) u_add2 (.a(l1[2*j]), .b(l1[2*j+1]), .cin(ray[3+j]), .s(l2[j]));
  end
  // level 3: carry inputs ray 1 and ray 3
  ga_ripple #(.W(3)) u_add3_a (.a(l2[0]), .b(l2[1]), .cin(ray[0]), .s(l3[0]));
  ga_ripple #(.W(3)) u_add3_b (.a(l2[2]), .b(l2[3]), .cin(ray[2]), .s(l3[1]));
  // level 4: carry input ray 2
  ga_ripple #(.W(4)) u_add4 (.a(l3[0]), .b(l3[1]), .cin(ray[1]), .s(sum));

  always_ff @(posedge aclk or negedge rst_n)
    if (!rst_n) h <= '0;
    else        h <= sum;
endmodule
