// ga_pipeline - block 'Pipeline' of the ray finder gate array: an 8-bit wide
// shift register whose length is selectable from 1 to 8 clock cycles.
//
// It holds the big-tower signals of a bunch crossing until the vertex finder
// has decided which z-bin is wanted.  Every rising edge of PClk shifts din into
// stage 0; the output is stage len, so a value appears len+1 PClk edges after
// it was presented.  An active-low pipe enable (en_n) is sampled on the same
// edge: while the sampled value is high the outputs are held low, so raising
// en_n disables the outputs from the next clock on.
//
// Interface: pclk, rst_n, din[7:0], len[2:0] (length code, length = len+1),
// en_n; dout[7:0].
//
// Width, the length range 1..8 and the active-low enable acting on the next
// clock are published; a tapped shift register with a read multiplexer, the
// value of a disabled output (low) and the asynchronous reset are this
// design's choices.
module ga_pipeline
  import rf_pkg::*;
(
  input  logic             pclk,
  input  logic             rst_n,
  input  logic [NPIPE-1:0] din,
  input  logic [2:0]       len,
  input  logic             en_n,
  output logic [NPIPE-1:0] dout
);
  logic [NPIPE-1:0] stage [8];
  logic             en_q;

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) stage[i] <= '0;
      en_q <= 1'b0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < 8; i++) stage[i] <= stage[i-1];
      en_q <= ~en_n;
    end
  end

  assign dout = en_q ? stage[len] : '0;
endmodule
