// rf_patch - patch area and PE multiplexers of the ray finder board.
//
// The patch area is the only part in which the boards of the 16 z-bins
// differ: it routes the latched pads to the 45 pins of each of the 8 ray gate
// arrays so that the chip's fixed ray/pin allocation forms the rays that point
// to this board's z-bin.  While a chip is being programmed (its PE high) some
// of its address and data pins would be tied to the same pad; 2-to-1
// multiplexers switched by that chip's PE then connect a different pad.
//
// Interface: pad[NP-1:0], pe[7:0]; pin[8][45].  Combinational.
// The routing is taken from the tables rf_pkg::PATCH_CODE (pad of each pin,
// 0 = tied low) and rf_pkg::PATCH_PE_CODE (pad used instead while the chip's
// PE is high, 0 = no multiplexer on that pin), which hold the prototype board
// for histogram bin 9; a board for another z-bin uses other tables.
// Published: the pin/pad tables of gate arrays 1-4 and 6 and the multiplexers
// of 2, 3, 4 and 6.  This design's own: the pad bus layout, the five
// multiplexers of gate array 1 onto spare lines, and gate arrays 5, 7, 8
// tied low.  Most pins are plain wires from a pad input, which is what a
// patch area is.
module rf_patch
  import rf_pkg::*;
#(
  parameter int unsigned NP = NPADS
) (
  input  logic [NP-1:0]      pad,
  input  logic [NGA_RAY-1:0] pe,
  output logic [NPIN-1:0]    pin [NGA_RAY]
);
  for (genvar g = 0; g < NGA_RAY; g++) begin : g_ga
    for (genvar j = 0; j < NPIN; j++) begin : g_pin
      localparam int unsigned LO = patch_pad(g, j, 1'b0);
      localparam int unsigned HI = patch_pad(g, j, 1'b1);
      logic lo_v, hi_v;
      if (LO < NP) begin : g_lo
        assign lo_v = pad[LO];
      end else begin : g_lo_gnd
        assign lo_v = 1'b0;
      end
      if (HI < NP) begin : g_hi
        assign hi_v = pad[HI];
      end else begin : g_hi_gnd
        assign hi_v = 1'b0;
      end
      assign pin[g][j] = pe[g] ? hi_v : lo_v;
    end
  end
endmodule
