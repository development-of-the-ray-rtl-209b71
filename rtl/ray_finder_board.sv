// ray_finder_board - ray finder board of the H1 z-vertex trigger: the logic of
// one z-bin of one phi segment.
//
// Every 96 ns bunch crossing the board receives the fired/not-fired status of
// the MWPC pads of its phi segment and
//   * counts the rays - straight lines through one fired pad in each of four
//     chambers pointing back to this board's 50 mm slice of the beam axis -
//     giving the 8-bit height of one bin of the z-vertex histogram, and
//   * groups the rays into 16 calorimeter big-tower directions, delayed in a
//     pipeline until the vertex finder has chosen a bin; 'Bin Select' then
//     enables the big-tower outputs of the chosen bin only.
//
// Data path:
//   pad_in -> rf_pad_latch (InClk) -> rf_patch -> 8 ray gate arrays
//     H1..H5 of each (AClk)  -> rf_hist_adder -> histogram[7:0]
//     Out1..Out8 of each (PClk pipeline) -> 2 big tower gate arrays, which
//     work in direct mode, OR the incoming signals into 8 big towers each,
//     delay them again and are gated by Bin Select on ray 20
//     -> big_tower[15:0] (gate array 9 -> towers 1..8, 10 -> 9..16).
// Programming: pads DEC_PAD carry a chip address that rf_chip_select latches
// while strobe is high; the addressed gate array gets PE high, and its
// configuration registers are loaded from pads on AClk.  Bin Select (active
// low) inhibits the decoder.  Big tower gate arrays are programmed through the
// ray gate arrays set to direct mode.
//
// Timing with all three clocks on the same edge: histogram shows the rays of
// the pads presented two clock edges earlier; big_tower follows after
// 1 + (L1+1) + (L2+1) edges, L1/L2 the pipeline length codes of the two
// stages, with the Bin Select enable taking effect one edge after it changes
// (plus the first stage's and pad latch's delay, since it enters as a pin).
//
// The test stand's circular shifter (circular_shifter) is placed beside the
// board with its own ts_* ports; it is not connected to the board logic.
//
// Ports: plain signals.  rst_n is a simulation reset added by this design.
// The histogram is brought out as 8 plain bits instead of twisted-pair line
// drivers, and the big towers active high instead of through open-collector
// inverting drivers.  The block structure, the patch area of the prototype
// board (bin 9) and the big-tower wiring follow the published design.
module ray_finder_board
  import rf_pkg::*;
(
  input  logic             in_clk,
  input  logic             a_clk,
  input  logic             p_clk,
  input  logic             rst_n,
  input  logic             strobe,
  input  logic             bin_select_n,
  input  logic [NPADS-1:0] pad_in,
  output logic [7:0]       histogram,
  output logic [15:0]      big_tower,
  // test-stand pattern generator, independent of the board logic
  input  logic             ts_clk,
  input  logic             ts_load,
  input  logic [7:0]       ts_load_addr,
  input  logic [7:0]       ts_load_data,
  input  logic             ts_run,
  output logic [191:0]     ts_pattern
);
  logic [NPADS-1:0] pad_q;
  logic [15:0]      sel;
  logic [NPIN-1:0]  ga_pin [NGA_RAY];
  logic [4:0]       ga_h   [NGA_RAY];
  logic [NPIPE-1:0] ga_out [NGA_RAY];
  logic [NPIN-1:0]  bt_pin [NGA_BT];

  rf_pad_latch #(.N(NPADS)) u_latch (
    .in_clk (in_clk),
    .rst_n  (rst_n),
    .pad_in (pad_in),
    .pad_q  (pad_q)
  );

  rf_chip_select u_select (
    .clk     (in_clk),
    .rst_n   (rst_n),
    .strobe  (strobe),
    .inhibit (bin_select_n),
    .addr_in ({pad_q[DEC_PAD[3]], pad_q[DEC_PAD[2]], pad_q[DEC_PAD[1]], pad_q[DEC_PAD[0]]}),
    .sel     (sel)
  );

  rf_patch #(.NP(NPADS)) u_patch (
    .pad (pad_q),
    .pe  (sel[NGA_RAY-1:0]),
    .pin (ga_pin)
  );

  for (genvar g = 0; g < NGA_RAY; g++) begin : g_ray_ga
    ray_gate_array u_ga (
      .aclk  (a_clk),
      .pclk  (p_clk),
      .rst_n (rst_n),
      .pe    (sel[g]),
      .pin   (ga_pin[g]),
      .h     (ga_h[g]),
      .dout  (ga_out[g])
    );
  end

  rf_hist_adder #(.N(NGA_RAY)) u_hist (
    .h   (ga_h),
    .sum (histogram)
  );

  // Big tower gate arrays: inputs from the pipeline outputs of the ray gate
  // arrays, Bin Select on pin P410 (ray 20).
  for (genvar b = 0; b < NGA_BT; b++) begin : g_bt_ga
    for (genvar j = 0; j < NPIN; j++) begin : g_pin
      localparam int unsigned SRC = bt_src(b, j);
      if (SRC == 0) begin : g_gnd
        assign bt_pin[b][j] = 1'b0;
      end else if (SRC == 1) begin : g_binsel
        assign bt_pin[b][j] = bin_select_n;
      end else begin : g_out
        assign bt_pin[b][j] = ga_out[(SRC - 100) / 10 - 1][(SRC - 100) % 10 - 1];
      end
    end
    logic [4:0] bt_h;  // adder outputs of these chips are not used
    ray_gate_array u_ga (
      .aclk  (a_clk),
      .pclk  (p_clk),
      .rst_n (rst_n),
      .pe    (sel[NGA_RAY + b]),
      .pin   (bt_pin[b]),
      .h     (bt_h),
      .dout  (big_tower[8*b +: 8])
    );
  end

  // Circular shifter of the test stand.  It stands beside the board: in the
  // test set-up its pattern drives a board's pad inputs through cables.
  circular_shifter u_shifter (
    .clk       (ts_clk),
    .rst_n     (rst_n),
    .load      (ts_load),
    .load_addr (ts_load_addr),
    .load_data (ts_load_data),
    .run       (ts_run),
    .pattern   (ts_pattern)
  );
endmodule
