// rf_chip_select - chip-select decoder of the ray finder board (HC4514 type).
//
// Programming a gate array needs its PE input high.  The board sends a 4-bit
// chip address over four MWPC pad lines; a 4-to-16 decoder latches it while
// Strobe is high and drives output 'addr' high; output k is the PE of gate
// array k+1 (addresses 0..9, the ten gate arrays of the board).  Inhibit,
// wired to the board's active-low Bin Select, forces every output low, so
// only the selected z-bin can be programmed.  After programming the decoder
// is left at an unused address such as 15.
//
// Interface: clk (the board's InClk), rst_n, strobe, inhibit, addr_in[3:0];
// sel[15:0].  The address is taken on the rising clock edge while strobe is
// high (the HC4514 latch is transparent while strobe is high; here it is a
// clocked register).  Reset loads address 15.
//
// The decoder, its strobe and inhibit connections are published; the clocked
// register and the reset value are this design's choices.
module rf_chip_select (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        strobe,
  input  logic        inhibit,
  input  logic [3:0]  addr_in,
  output logic [15:0] sel
);
  logic [3:0] addr_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      addr_q <= 4'hF;
    else if (strobe) addr_q <= addr_in;

  always_comb begin
    sel = '0;
    if (!inhibit) sel[addr_q] = 1'b1;
  end
endmodule
