// rf_pad_latch - input register of the ray finder board.
//
// The 166 MWPC pad signals of one phi segment arrive from the receiver cards
// over the backplane and are sampled on the rising edge of InClk, which both
// synchronises them to the HERA clock (96 ns period) and buffers them, since
// every pad may drive up to four gate array pins per z-bin.
//
// Interface: in_clk, rst_n, pad_in[N-1:0]; pad_q[N-1:0], valid one InClk
// cycle after pad_in.
//
// The board's prototype uses 74ACT374 edge-triggered flip-flops, modelled
// here; the transparent-latch variant the board also allows is not built.
// The reset is this design's addition for simulation.
module rf_pad_latch #(
  parameter int unsigned N = 166
) (
  input  logic         in_clk,
  input  logic         rst_n,
  input  logic [N-1:0] pad_in,
  output logic [N-1:0] pad_q
);
  always_ff @(posedge in_clk or negedge rst_n)
    if (!rst_n) pad_q <= '0;
    else        pad_q <= pad_in;
endmodule
