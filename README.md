# Ray finder electronics for the H1 z-vertex trigger

This is synthesizable SystemVerilog for the ray finder of the H1 z-vertex trigger at HERA. The trigger sees the fired/not-fired pattern of the multi-wire proportional chamber (MWPC) pads at every 96 ns bunch crossing. It must decide quickly whether the event came from the interaction region.

It works like this:

- A "ray" is a straight line from the beam axis through one pad in each of four chamber layers. A ray is true when all four of its pads fired.
- Each ray points back to one of 16 slices (bins) of the beam axis, each about 50 mm long. Counting the true rays per slice gives a histogram of z positions. The vertex finder looks for its peak.
- The same rays are also grouped by direction into 16 calorimeter "big towers". They are held in a pipeline until the vertex finder has chosen a bin. Then only the chosen bin's big-tower signals are let out.

The trigger has 16 phi segments × 16 z-bins. Each segment/bin pair is handled by one **ray finder board** with 8 **ray finder gate arrays**. The board adds two more gate arrays that form the big-tower pipeline. This design builds:

- the gate array, down to its blocks;
- one complete board, top module `ray_finder_board`, with the pad allocation of the prototype board (z-bin 9);
- the circular shifter pattern generator used to test boards.

## The ray finder gate array (`ray_gate_array`)

One chip has 45 pad pins and forms 31 rays. The pins are named after the chamber and the pad within the chip: P11..P18 (chamber 1), P21..P29, P31..P314 and P41..P414. In the RTL they are one vector `pin[44:0]` in that order. Rays 1..31 are bits 0..30.

The chip has three outputs:

- **H1..H5** (`h`): the number of true rays, 0..31, registered on AClk.
- **Out1..Out8** (`dout`): eight ORs of selected rays, each delayed by a pipeline of 1..8 PClk cycles.
- The configuration: 236 programming bits held inside the chip.

### Ray forming and the '3 out of 4' option (`ga_input`, `ga_3of4`)

Neighbouring rays share pads, so the 124 pad connections of 31 rays fit into 45 pins. `rf_pkg::RAY_PAD` is the fixed allocation.

Every pin has a **preset** bit. A ray is true if:

- all four of its pads fired, or
- three fired and the missing pad's preset bit is set.

This lets one dead pad be bridged without setting it permanently true. A pad forced true would add fake rays to every ray through it. Each ray also has an **enable** bit.

### Adder (`ga_adder`)

A tree of adders counts the 31 rays:

- 8 full adders (`ga_fa`) take rays 8..31 three at a time.
- 4 two-bit adders take rays 4..7 on their carry inputs.
- 2 three-bit adders take rays 1 and 3 on their carry inputs.
- A final 4-bit adder takes ray 2 on its carry input.

`ga_ripple` is the adder used at each width. The 5-bit sum goes into flip-flops on AClk, so `h` shows the rays that were present before the last AClk edge.

The tree shape matters only for timing in the original chip. Functionally it is a population count.

### OR and pipeline (`ga_or`, `ga_pipeline`)

Each of the 8 ORs can take any ray from a fixed range:

| pipe | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| rays | 1–8 | 1–16 | 1–24 | 1–31 | 1–31 | 9–31 | 17–31 | 25–31 |

That makes 155 programmable OR bits. Every ray reaches at most 5 ORs.

Each OR output enters an 8-stage shift register. The length code 0..7 selects which stage drives `dout`, so the delay is code+1 clocks. A registered, active-low pipe enable blanks the outputs from the next clock on.

### Configuration and modes (`ga_config`) — the part to read carefully

The 236 bits sit in 30 addressable 8-bit registers. Registers are written through the ray inputs themselves, so programming needs no extra pins:

- While **PE** is high, every ray is enabled and each ray also follows one **direct pin**. This is direct mode.
- Rays 9..13 carry a 5-bit address, active low, ray 9 = LSB.
- Rays 1..8 carry the data byte, ray 1 = LSB.
- Each rising AClk edge with PE high writes the byte to that register. Addresses 30 and 31 do nothing.
- All pins low means address 31, so an idle bus writes nothing.

| bits | meaning |
|---|---|
| 0 | Mode Control: 1 = direct mode in normal operation |
| 1..31 | enable ray 1..31 |
| 32..76 | preset of pin P11..P414 (pin order) |
| 77..231 | OR bits, pipe 1 first, rays ascending |
| 232..234 | pipeline length code |
| 235 | Pipe Enable*: 0 makes ray 20 the active-low pipe enable |

Some pins get a second meaning when PE is high (`ray_gate_array`). The chip then works as a plain 8-bit pipeline:

- rays 24..31 feed pipelines 1..8 directly, not through the ORs;
- rays 21..23 set the length, not the stored code;
- ray 20 is the pipe enable.

Ray 20 is also the pipe enable in normal operation when bit 235 is 0. The big-tower chips use this for Bin Select. After reset bit 235 is 0, so a chip that was never programmed has ray 20 as its pipe enable.

In **direct mode** a ray is its direct pin ORed with its normal four-pad rule. If pins P11..P18 are held low, no four-pad coincidence is possible and the chip simply counts, ORs and delays 31 plain inputs.

## The ray finder board (`ray_finder_board`)

```
pad_in[165:0] -> rf_pad_latch (InClk) -> rf_patch -> 8 x ray_gate_array
      8 x H[4:0] -> rf_hist_adder -> histogram[7:0]
      8 x Out[7:0] -> 2 x ray_gate_array (big towers, direct mode) -> big_tower[15:0]
pads 147..150 + strobe -> rf_chip_select -> PE of chips 1..10 (inhibited by bin_select_n)
```

- **Pad latch** (`rf_pad_latch`): 166 pad lines are registered on InClk.
- **Patch area** (`rf_patch`): wires each chip pin to its pad. It follows the prototype board for z-bin 9, which uses 147 pads in 133 rays on chips 1–4 and 6.
  - The pad bus carries those 147 pads in chamber order.
  - Lines 147..150 carry the chip address.
  - Lines 151..155 are spare programming lines.
- **Histogram adder** (`rf_hist_adder`): adds the eight H outputs into an 8-bit bin height. At most 8 × 31 = 248.
- **Big tower chips** (gate arrays 9 and 10): run in direct mode. Their pins are wired to 30 Out lines of chips 1–6. Their ORs merge these into 8 big towers each, and their pipelines add a second delay. Bin Select drives pin P410 (ray 20) of both chips. With Pipe Enable* = 0, a high `bin_select_n` blanks all 16 big towers of the board. In the experiment they then drop out of a wired OR across bins.
- **Chip select** (`rf_chip_select`): 4-to-16 decoder. It takes the address from the four address pads while `strobe` is high. Output k is the PE of chip k+1. `bin_select_n` high inhibits all outputs, so only the selected z-bin can be programmed. After reset, and after programming, the address is parked at 15.

### Programming the board

1. Hold `bin_select_n` low. Put a chip number on pads 147..150, and raise `strobe` on the following clock.
2. Send one address/data pattern per clock on the pads that reach that chip's programming pins.
3. Repeat for each chip, then select address 15.

The big-tower chips get their pins from the outputs of chips 1–6, not from pads. To program them, first set chips 1–6 to direct mode with one ray per OR and pipeline length 1, which makes them transparent. Then send the patterns through them; they arrive one clock later. Finally, reprogram chips 1–6 for ray finding.

On the board some programming pins share a pad with another programming pin. There, a 2-to-1 multiplexer switched by the chip's PE takes the pin from another pad while PE is high. Chips 2, 3, 4 and 6 use the published multiplexer pads. Chip 1 had none listed, although five pairs of its programming pins collide. This design gives it five spare lines.

### Timing

All three clocks may be the same clock, as in the testbench:

- **Histogram:** shows the pads presented two rising edges earlier (pad latch, then adder register).
- **Big towers:** follow after 1 + (L1+1) + (L2+1) edges, where L1 and L2 are the length codes of the two pipeline stages.
- **Bin Select:** its pipe enable acts on the big-tower outputs one edge after it changes.

The original board meets a 96 ns crossing period. Path delays and clock skews are properties of the gate array technology and are not modelled.

## Test pattern generator (`circular_shifter`)

It sits in the top module beside the board, with its own `ts_*` ports, and is not connected to the board logic. It holds 192 eight-bit shift registers, loaded one at a time through `load`/`load_addr`/`load_data`. While `run` is high they rotate together. Bit 0 of every register forms a 192-bit pattern that repeats every 8 clocks, which drives a board under test. The original is loaded over IEEE-488; here it has a parallel load port.

## Verification

Every module has a self-checking testbench in `tb/`:

- `tb_model_pkg` is a reference model of the gate array written from the rules above. It is independent of the RTL's structure.
- `tb_ray_gate_array` programs the chip through its pins and compares every clock against the model. It covers normal operation, direct mode, PE pipeline mode and the ray-20 pipe enable.
- `tb_ray_finder_board` runs the whole board at full size: 166 pads and 10 chips, default parameters. It also loads and runs the test-stand shifter. It performs the complete programming sequence above, checks the decoder inhibit, then sends random events with Bin Select changing.
  - It compares histogram and big towers against a cycle model on every clock.
  - It checks the two-edge histogram latency directly.
  - It counts each mechanism: register writes, multiplexed programming pads, 3-out-of-4 completions, disabled rays, nonzero histogram and big towers, Bin Select blanking, and pipeline lengths above 1. A mechanism that never occurs counts as a failure.

- `tb_board_dead_pads` also runs on the full-size board. About 2% of the pads are made dead, and single tracks are sent through the board:
  - with presets off, tracks crossing a dead pad are lost;
  - after presetting the dead pads in every chip that reads them, the same kind of tracks are counted again.

  The histogram is checked for every track against a count made directly from the pad tables.

To simulate with plain Verilator, list `rtl/rf_pkg.sv` and `tb/tb_model_pkg.sv` first, then the testbench, with `-y rtl -y tb`:

```
verilator --binary --timing -y rtl -y tb rtl/rf_pkg.sv tb/tb_model_pkg.sv tb/tb_ray_finder_board.sv --top-module tb_ray_finder_board
```

## Differences from the original and open points

- **Ray in the final carry input:** two descriptions disagree on whether ray 1 or ray 2 feeds the last adder's carry input. Ray 2 is used. The count is the same either way.
- **OR ranges:** the ray allocation table puts the range borders one ray lower (1–7, 8–15, …) than the programming bit map. The bit map is followed; both give 155 bits.
- **Ray 20 pipe enable:** one note says ray 20 becomes the pipe enable when the Pipe Enable bit is *set*. The bit map says when it is *low*. The bit map is followed.
- **Missing allocations:** chip 5's pin allocation of the prototype is not available, so its pins are tied low. Chips 7 and 8 are unused on the prototype and also tied low. The histogram of the prototype's bin therefore lacks chip 5's rays.
- **Big-tower wiring:**
  - The chip 2 output list and the GA 9 input table disagree on GA 9 pin P36. The chip 2 list is used.
  - Chip 4's output list disagrees with the GA 10 input table. The GA 10 table is used.
- **Own choices:**
  - Chip 1's five programming multiplexers and spare lines.
  - Which pads carry the chip address.
  - The 166-line pad bus layout.
- **Registers:**
  - The configuration latches, transparent while AClk is high in the chip, are rising-edge registers here.
  - The decoder's transparent latch is a register loaded on the clock edge while `strobe` is high.
  - An asynchronous reset `rst_n` clears all registers; the original has none.
- **Not modelled** (no logic function): output line drivers (twisted pair for the histogram, inverting open collector for big towers), pad and fan-out buffers, and the crate, backplane and vertex finder.

## Files

- `rtl/rf_pkg.sv`: constants, allocation tables, configuration map and patch tables.
- `rtl/ga_*.sv`: gate array blocks.
- `rtl/ray_gate_array.sv`: the chip.
- `rtl/rf_*.sv`: board parts.
- `rtl/ray_finder_board.sv`: the board (top).
- `rtl/circular_shifter.sv`: the pattern generator.
- `tb/`: testbenches and the reference model.
