// ga_input - block 'Input' of the ray finder gate array.
//
// Builds the 31 rays of one gate array from its 45 pad pins.  Each ray uses
// four pins, one per chamber, following the fixed ray/pin allocation of the
// chip (rf_pkg::RAY_PAD): neighbouring rays share pads, so 45 pins serve 31
// rays.  Every ray passes through a '3 of 4' subblock (ga_3of4) with the
// preset bits of its four pins, the direct-mode pin of the ray and its enable.
//
// Interface: pin[44:0] in P11..P414 order, preset[44:0] one bit per pin,
// enable[30:0] per ray, direct selects direct mode.  Combinational.
//
// The allocation tables are the published ones; the vector ordering is this
// design's.
module ga_input
  import rf_pkg::*;
(
  input  logic [NPIN-1:0] pin,
  input  logic [NPIN-1:0] preset,
  input  logic [NRAY-1:0] enable,
  input  logic            direct,
  output logic [NRAY-1:0] ray
);
  for (genvar r = 0; r < NRAY; r++) begin : g_ray
    localparam int unsigned P0 = ray_pin(r, 0);
    localparam int unsigned P1 = ray_pin(r, 1);
    localparam int unsigned P2 = ray_pin(r, 2);
    localparam int unsigned P3 = ray_pin(r, 3);
    localparam int unsigned PD = direct_pin(r);
    ga_3of4 u_3of4 (
      .wire_in ({pin[P3], pin[P2], pin[P1], pin[P0]}),
      .preset  ({preset[P3], preset[P2], preset[P1], preset[P0]}),
      .direct  (direct),
      .dir_pin (pin[PD]),
      .enable  (enable[r]),
      .ray     (ray[r])
    );
  end
endmodule
