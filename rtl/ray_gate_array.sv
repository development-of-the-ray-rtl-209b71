// ray_gate_array - the ray finder gate array: one chip of the z-vertex
// trigger's ray finder.
//
// From 45 MWPC pad pins it forms 31 rays (ga_input), counts the true rays into
// a 5-bit number registered on AClk (ga_adder, pins H1..H5), groups the rays
// into 8 big-tower directions with programmable ORs (ga_or) and delays those
// 8 signals by 1..8 PClk cycles (ga_pipeline, pins Out1..Out8).  All options
// sit in 236 configuration bits (ga_config).
//
// Modes and pin reassignments:
//   * Direct mode (PE high or the 'Mode Control' bit set): each ray also
//     follows its own direct pin, so the chip counts 31 plain inputs.
//   * PE high: all rays enabled; rays 9..13 / 1..8 address and load the
//     configuration registers on AClk; rays 24..31 feed the pipeline instead
//     of the ORs; rays 21..23 set the pipeline length instead of the stored
//     length; ray 20 is the active-low pipe enable.  The chip then works as a
//     plain 8-bit pipeline of selectable length.
//   * 'Pipe Enable*' configuration bit low: ray 20 is the active-low pipe
//     enable also in normal operation (used by the big-tower chips for the
//     bin select).  Otherwise the pipeline is always enabled.
//
// Timing: h is the count of the rays present before the last rising AClk
// edge; dout follows the ORed rays len+1 PClk edges later.
//
// Ports: aclk, pclk, pe, rst_n (simulation reset, not a chip pin), pin[44:0]
// (P11..P414), h[4:0] (H1 = bit 0), dout[7:0] (Out1 = bit 0).
//
// The block structure, the pin reassignments and the configuration map are
// published; the reset and the vector orderings are this design's.
module ray_gate_array
  import rf_pkg::*;
(
  input  logic             aclk,
  input  logic             pclk,
  input  logic             rst_n,
  input  logic             pe,
  input  logic [NPIN-1:0]  pin,
  output logic [4:0]       h,
  output logic [NPIPE-1:0] dout
);
  logic [NCFG_BITS-1:0] cfg;
  logic [NRAY-1:0]      ray;
  logic [NRAY-1:0]      enable;
  logic                 direct;
  logic [NPIPE-1:0]     or_out, pipe_in;
  logic [2:0]           len;
  logic                 reassign20, pipe_en_n;

  assign direct = pe | cfg[CFG_MODE];
  assign enable = cfg[CFG_EN0 +: NRAY] | {NRAY{pe}};

  ga_input u_input (
    .pin    (pin),
    .preset (cfg[CFG_PRESET0 +: NPIN]),
    .enable (enable),
    .direct (direct),
    .ray    (ray)
  );

  ga_config u_config (
    .aclk  (aclk),
    .rst_n (rst_n),
    .pe    (pe),
    .ray   (ray[12:0]),
    .cfg   (cfg)
  );

  ga_adder u_adder (
    .aclk  (aclk),
    .rst_n (rst_n),
    .ray   (ray),
    .h     (h)
  );

  ga_or u_or (
    .ray    (ray),
    .cfg_or (cfg[CFG_OR0 +: NOR_BITS]),
    .pipe   (or_out)
  );

  assign pipe_in    = pe ? ray[30:23] : or_out;
  assign len        = pe ? ray[22:20] : cfg[CFG_LEN0 +: 3];
  assign reassign20 = pe | ~cfg[CFG_PIPE_EN_N];
  assign pipe_en_n  = reassign20 & ray[19];

  ga_pipeline u_pipeline (
    .pclk  (pclk),
    .rst_n (rst_n),
    .din   (pipe_in),
    .len   (len),
    .en_n  (pipe_en_n),
    .dout  (dout)
  );
endmodule
