// ga_3of4 - one ray of the ray finder gate array (the '3 of 4' subblock).
//
// A ray is the coincidence of four MWPC pads, one per chamber, that lie on a
// straight line pointing back to the beam axis.  The ray is true when all four
// pads fired.  For inefficient chambers each pad has a preset bit: a pad whose
// preset bit is set may be missing, so the ray is also true when three pads
// fired and the fourth one, the missing one, is preset.  At least three pads
// must always have fired.  In direct mode the ray's direct pin is ORed in, so
// that the chip can be used as a plain 31-input counter; the pad coincidence is
// not switched off, which is why the chamber-1 pins must be held low then.
// Finally the ray is gated by its enable bit.
//
// Purely combinational; the ray is registered downstream (adder output
// flip-flops, pipeline).
//
// Follows the published description: the four-pad coincidence, one preset bit
// per pad, direct mode and enable.  The ORing of the direct pin into the ray is
// this design's reading of the direct-mode description.
module ga_3of4 (
  input  logic [3:0] wire_in,  // the four pads of the ray, chamber 1..4
  input  logic [3:0] preset,   // preset bit of each of the four pads
  input  logic       direct,   // direct mode
  input  logic       dir_pin,  // the ray's direct-mode pin
  input  logic       enable,   // ray enable
  output logic       ray
);
  logic all4, three;

  always_comb begin
    all4  = &wire_in;
    three = 1'b0;
    for (int i = 0; i < 4; i++) begin
      // all pads but pad i fired, and pad i may be missing
      logic others;
      others = 1'b1;
      for (int j = 0; j < 4; j++)
        if (j != i) others = others & wire_in[j];
      three = three | (others & preset[i]);
    end
    ray = enable & (all4 | three | (direct & dir_pin));
  end
endmodule
