// ga_or - block 'OR' of the ray finder gate array: eight programmable ORs that
// group rays into big-tower directions.
//
// OR p can take the rays PIPE_LO[p]..PIPE_HI[p] (rays 1-8, 1-16, 1-24, 1-31,
// 1-31, 9-31, 17-31, 25-31): every ray reaches at most five ORs, which makes
// 155 programming bits.  Bit 'ray r to pipe p' of cfg_or selects ray r into
// OR p; cfg_or is laid out as in the configuration map (pipe 1 first, rays
// ascending).  Combinational.
//
// The ray ranges and the bit order are the published programming map; the
// ray/pipe allocation table of the same description places the range borders
// one ray lower (1-7, 8-15, 16-23, 24-31), and this design follows the
// bit-level map.
module ga_or
  import rf_pkg::*;
(
  input  logic [NRAY-1:0]     ray,
  input  logic [NOR_BITS-1:0] cfg_or,
  output logic [NPIPE-1:0]    pipe
);
  always_comb begin
    for (int p = 0; p < NPIPE; p++) begin
      pipe[p] = 1'b0;
      for (int r = 0; r < NRAY; r++) begin
        if (or_bit(r, p) >= 0)
          pipe[p] = pipe[p] | (ray[r] & cfg_or[or_bit(r, p) - CFG_OR0]);
      end
    end
  end
endmodule
