// circular_shifter - test pattern generator for the ray finder board and for
// single gate arrays.
//
// 192 (12 x 16) circular shift registers, 8 bits long each, are loaded by a
// host computer and then shifted together at the trigger's operating rate, so
// that they present a 192-bit wide pattern that changes every clock and
// repeats every 8th clock.  166 of the bits drive a ray finder board (or 45 a
// single gate array socket) while a logic analyser records the outputs.
//
// Interface: clk, rst_n; load port: load (one register written per clock),
// load_addr (register 0..191), load_data[7:0]; run (shift when high);
// pattern[191:0], bit i = current output bit (bit 0 of the 8) of register i.
// While load is high the registers hold, apart from the one being written.
//
// The register count, length and circular operation are published; the host
// interface (an IEEE-488 bus in the original) is replaced by the simple load
// port above, which is this design's choice.
module circular_shifter #(
  parameter int unsigned NREG = 192,
  parameter int unsigned LEN  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [$clog2(NREG)-1:0]  load_addr,
  input  logic [LEN-1:0]           load_data,
  input  logic                     run,
  output logic [NREG-1:0]          pattern
);
  logic [LEN-1:0] sr [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) sr[i] <= '0;
    end else if (load) begin
      if (32'(load_addr) < NREG) sr[load_addr] <= load_data;
    end else if (run) begin
      for (int i = 0; i < NREG; i++) sr[i] <= {sr[i][0], sr[i][LEN-1:1]};
    end
  end

  always_comb
    for (int i = 0; i < NREG; i++) pattern[i] = sr[i][0];
endmodule
