// ga_config - block 'Config' of the ray finder gate array: 30 addressable
// 8-bit registers holding the chip's 236 programming bits.
//
// While PE is high the chip is in programming mode.  Rays 9..13 (in direct
// mode the pins P35, P45, P36, P46, P37) carry the register address, active
// low, ray 9 the least significant bit; rays 1..8 (pins P31, P41, P32, P42,
// P33, P43, P34, P44) carry the data, ray 1 the least significant bit.  On
// each rising edge of AClk with PE high, the addressed register is loaded.
// Addresses 30 and 31 do not exist.  The bit map is given in rf_pkg.
//
// Interface: aclk, rst_n, pe, ray[30:0]; cfg[235:0].
//
// The address/data assignment, the active-low address and the bit map are
// published.  The chip uses level-sensitive latches that pass data while AClk
// is high; here they are edge-triggered registers written on the rising edge
// of AClk, and they are cleared by an asynchronous reset, which the chip does
// not have (its registers are loaded at power up).
module ga_config
  import rf_pkg::*;
(
  input  logic                 aclk,
  input  logic                 rst_n,
  input  logic                 pe,
  input  logic [12:0]          ray,     // rays 1..13
  output logic [NCFG_BITS-1:0] cfg
);
  logic [7:0] regs [NCFG_ADDR];
  logic [4:0] addr;

  assign addr = ~ray[12:8];

  always_ff @(posedge aclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NCFG_ADDR; a++) regs[a] <= '0;
    end else if (pe && addr < 5'(NCFG_ADDR)) begin
      regs[addr] <= ray[7:0];
    end
  end

  always_comb begin
    for (int a = 0; a < NCFG_ADDR; a++)
      for (int b = 0; b < 8; b++)
        if (a * 8 + b < NCFG_BITS) cfg[a*8+b] = regs[a][b];
  end
endmodule
