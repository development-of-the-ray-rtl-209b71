// tb_ray_finder_board - end-to-end test of one ray finder board at full size
// (166 pads, 8 ray gate arrays, 2 big tower gate arrays, default parameters).
//
// All three board clocks run from one clock.  A cycle model built from
// tb_model_pkg (pad latch, chip-select decoder, patch area, ten gate arrays,
// big tower wiring) runs in lockstep and histogram and big_tower are compared
// after every rising edge, from reset on.  The sequence follows how the board
// is set up in the experiment:
//   1. select each ray gate array through the four address pads and Strobe
//      and set it to direct mode with one ray per OR and the shortest
//      pipeline (a pass-through), writing the registers from the pads;
//   2. program the two big tower gate arrays through these pass-throughs
//      (direct mode, random ORs of the incoming signals, Bin Select on ray 20
//      as pipeline enable);
//   3. reprogram the ray gate arrays for ray finding (random enables,
//      presets, ORs and pipeline lengths);
//   4. park the decoder at address 15 and send random pad hits while Bin
//      Select changes.
// A write attempt with Bin Select high checks the decoder inhibit.  Each
// mechanism is counted; a mechanism that never happens counts as a failure.
// The test stand's circular shifter, which sits beside the board in the top,
// is loaded and run in parallel and checked bit by bit.
module tb_ray_finder_board;
  import rf_pkg::PATCH_CODE, rf_pkg::PATCH_PE_CODE, rf_pkg::BT_SRC;
  import tb_model_pkg::*;

  logic clk = 0, rst_n = 0, strobe = 0, bin_select_n = 0;
  logic [165:0] pad_in = '0;
  logic [7:0]   histogram;
  logic [15:0]  big_tower;
  logic         ts_load = 0, ts_run = 0;
  logic [7:0]   ts_addr = '0, ts_data = '0;
  logic [191:0] ts_pattern;

  ray_finder_board dut (
    .in_clk(clk), .a_clk(clk), .p_clk(clk), .rst_n(rst_n), .strobe(strobe),
    .bin_select_n(bin_select_n), .pad_in(pad_in), .histogram(histogram), .big_tower(big_tower),
    .ts_clk(clk), .ts_load(ts_load), .ts_load_addr(ts_addr), .ts_load_data(ts_data),
    .ts_run(ts_run), .ts_pattern(ts_pattern)
  );
  always #5 clk = ~clk;

  // ---------------- model ----------------
  logic [165:0] m_padq;
  logic [3:0]   m_addr;
  ga_state_t    m_ga [10];
  logic [44:0]  v_pins [10];
  logic [7:0]   v_out  [10];
  logic [15:0]  v_sel;

  int checks = 0, failures = 0;
  int n_write = 0, n_pe_mux = 0, n_inhibit = 0, n_3of4 = 0, n_disabled = 0, n_hist = 0;
  int n_bt = 0, n_blank = 0, n_long = 0, n_bt_write = 0;

  // ray chosen for each OR of a pass-through chip (1-based ray numbers)
  int pass_ray [8] = '{1, 9, 17, 25, 2, 10, 18, 26};

  // bus index of pad code chamber*1000+pad
  function automatic int idx(input int code);
    int base [6] = '{0, 37, 76, 95, 114, 130};
    int first [6] = '{23, 22, 1, 1, 5, 4};
    if (code / 1000 == 9) return 150 + code % 1000;
    return base[code/1000-1] + code % 1000 - first[code/1000-1];
  endfunction

  function automatic int pad_of(input int g, input int j, input bit pe);
    int code;
    code = (pe && PATCH_PE_CODE[g][j] != 0) ? PATCH_PE_CODE[g][j] : PATCH_CODE[g][j];
    return code == 0 ? -1 : idx(code);
  endfunction

  // combinational view of the board for the current model state and inputs
  task automatic view(input logic bsn);
    v_sel = bsn ? 16'h0 : 16'h1 << m_addr;
    for (int g = 0; g < 8; g++) begin
      for (int j = 0; j < 45; j++) begin
        int p;
        p = pad_of(g, j, v_sel[g]);
        v_pins[g][j] = (p < 0) ? 1'b0 : m_padq[p];
      end
      v_out[g] = m_ga_dout(m_ga[g], v_pins[g], v_sel[g]);
    end
    for (int b = 0; b < 2; b++) begin
      for (int j = 0; j < 45; j++) begin
        int s;
        s = BT_SRC[b][j];
        v_pins[8+b][j] = (s == 0) ? 1'b0 : (s == 1) ? bsn : v_out[(s-100)/10-1][(s-100)%10-1];
      end
      v_out[8+b] = m_ga_dout(m_ga[8+b], v_pins[8+b], v_sel[8+b]);
    end
  endtask

  // one clock: apply inputs at the falling edge, advance the model at the
  // rising edge, compare just after it
  task automatic step(input logic [165:0] pads, input bit stb, input bit bsn);
    logic [165:0] old_padq;
    int hsum;
    @(negedge clk);
    pad_in = pads;
    strobe = stb;
    bin_select_n = bsn;
    #1;
    view(bsn);
    for (int g = 0; g < 10; g++) begin
      logic [30:0] r;
      r = m_rays(v_pins[g], m_ga[g].cfg, v_sel[g]);
      if (v_sel[g] && ((~r[12:8]) & 5'h1f) < 30) begin
        n_write++;
        if (g >= 8) n_bt_write++;
        for (int j = 0; j < 45; j++)
          if (PATCH_PE_CODE[g < 8 ? g : 0][j] != 0 && g < 8 && v_pins[g][j]) n_pe_mux++;
      end
      if (!v_sel[g] && g < 8) begin
        if (m_used_3of4(v_pins[g], m_ga[g].cfg)) n_3of4++;
        if (m_rays(v_pins[g], m_ga[g].cfg | {31'h7fffffff, 1'b0}, 0) != r) n_disabled++;
      end
    end
    if (bsn && m_addr < 10 && |pads) n_inhibit++;
    @(posedge clk);
    old_padq = m_padq;
    for (int g = 0; g < 10; g++) m_ga[g] = m_ga_next(m_ga[g], v_pins[g], v_sel[g]);
    m_padq = pads;
    if (stb) m_addr = {old_padq[150], old_padq[149], old_padq[148], old_padq[147]};
    #1;
    view(bsn);
    hsum = 0;
    for (int g = 0; g < 8; g++) hsum += m_ga[g].h;
    checks += 2;
    if (histogram !== 8'(hsum)) begin
      failures++;
      if (failures < 10) $display("%0t histogram=%0d expected %0d", $time, histogram, hsum);
    end
    if (big_tower !== {v_out[9], v_out[8]}) begin
      failures++;
      if (failures < 10) $display("%0t big_tower=%h expected %h", $time, big_tower, {v_out[9], v_out[8]});
    end
    if (hsum != 0) n_hist++;
    if (big_tower != 0) n_bt++;
    for (int b = 8; b < 10; b++) begin
      if (!m_ga[b].enq && m_ga[b].stage[m_ga[b].cfg[234:232]] != 0) n_blank++;
      if (m_ga[b].cfg[234:232] > 0 && v_out[b] != 0) n_long++;
    end
  endtask

  task automatic select_chip(input int a);
    logic [165:0] p;
    p = '0;
    {p[150], p[149], p[148], p[147]} = 4'(a);
    step(p, 0, 0);
    step('0, 1, 0);
    step('0, 0, 0);
  endtask

  // pads that show pin values 'want' at ray gate array g (PE high if pe)
  function automatic logic [165:0] pads_for(input int g, input logic [44:0] want, input bit pe);
    logic [165:0] p;
    p = '0;
    for (int j = 0; j < 45; j++)
      if (want[j] && pad_of(g, j, pe) >= 0) p[pad_of(g, j, pe)] = 1'b1;
    return p;
  endfunction

  // pads that show pin values 'want' at big tower chip b through pass-throughs
  function automatic logic [165:0] pads_for_bt(input int b, input logic [44:0] want);
    logic [165:0] p;
    p = '0;
    for (int j = 0; j < 45; j++) begin
      int s, g, k, q;
      s = BT_SRC[b][j];
      if (want[j] && s >= 100) begin
        g = (s - 100) / 10 - 1;
        k = (s - 100) % 10 - 1;
        q = pad_of(g, m_dpin(pass_ray[k]), 0);
        if (q >= 0) p[q] = 1'b1;
      end
    end
    return p;
  endfunction

  task automatic write_ray_ga(input int g, input logic [235:0] c);
    select_chip(g);
    for (int a = 0; a < 30; a++) step(pads_for(g, m_prog_pins(a, 8'(c >> (a * 8))), 1), 0, 0);
    step('0, 0, 0);
  endtask

  task automatic write_bt_ga(input int b, input logic [235:0] c);
    select_chip(8 + b);
    for (int a = 0; a < 30; a++) step(pads_for_bt(b, m_prog_pins(a, 8'(c >> (a * 8)))), 0, 0);
    repeat (3) step('0, 0, 0);
  endtask

  function automatic logic [235:0] pass_cfg();
    logic [235:0] c;
    c = '0;
    c[0] = 1'b1;
    c[31:1] = '1;
    for (int p = 1; p <= 8; p++) c[m_or_bit(pass_ray[p-1], p)] = 1'b1;
    c[235] = 1'b1;
    return c;
  endfunction

  function automatic logic [235:0] bt_cfg(input int len);
    logic [235:0] c;
    c = '0;
    c[0] = 1'b1;
    c[31:1] = '1;
    for (int k = 77; k <= 231; k++) c[k] = ($urandom % 4) == 0;
    for (int p = 1; p <= 8; p++) if (m_or_bit(20, p) >= 0) c[m_or_bit(20, p)] = 1'b0;
    c[234:232] = 3'(len);
    c[235] = 1'b0;
    return c;
  endfunction

  function automatic logic [235:0] finder_cfg();
    logic [235:0] c;
    c = '0;
    for (int k = 1; k <= 31; k++) c[k] = ($urandom % 8) != 0;
    for (int k = 32; k <= 76; k++) c[k] = ($urandom % 6) == 0;
    for (int k = 77; k <= 231; k++) c[k] = ($urandom % 5) == 0;
    c[234:232] = 3'($urandom % 4);
    c[235] = 1'b1;
    return c;
  endfunction

  function automatic logic [165:0] hits(input int density);
    logic [165:0] p;
    for (int k = 0; k < 166; k++) p[k] = ($urandom % 100) < density;
    return p;
  endfunction

  int ray_gas [5] = '{0, 1, 2, 3, 5};  // chips with a patch area on the prototype

  // test-stand circular shifter, run alongside: load 192 bytes, rotate, and
  // check that each output walks through its byte and repeats every 8 clocks
  int n_shift = 0;
  logic [7:0] ts_mem [192];
  initial begin
    @(posedge rst_n);
    for (int i = 0; i < 192; i++) begin
      @(negedge clk);
      ts_load = 1; ts_addr = 8'(i); ts_data = 8'($urandom); ts_mem[i] = ts_data;
    end
    @(negedge clk) ts_load = 0; ts_run = 1;
    for (int t = 0; t < 24; t++) begin
      #1;
      checks++;
      for (int i = 0; i < 192; i++)
        if (ts_pattern[i] !== ts_mem[i][t % 8]) begin
          failures++;
          $display("shifter t=%0d register %0d wrong", t, i);
          break;
        end
      if (t > 0) n_shift++;
      @(negedge clk);
    end
    ts_run = 0;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_padq = '0;
    m_addr = 4'hF;
    for (int g = 0; g < 10; g++) m_ga[g] = m_ga_reset();
    #12 rst_n = 1;
    // decoder inhibit: chip 1 selected, Bin Select high, write attempt
    select_chip(0);
    step(pads_for(0, m_prog_pins(0, 8'hff), 1), 0, 1);
    step('0, 0, 0);
    // 1. pass-throughs
    foreach (ray_gas[i]) write_ray_ga(ray_gas[i], pass_cfg());
    foreach (ray_gas[i]) begin
      checks++;
      if (m_ga[ray_gas[i]].cfg !== pass_cfg()) begin
        failures++;
        $display("gate array %0d not set up as pass-through", ray_gas[i] + 1);
      end
    end
    // 2. big tower chips
    write_bt_ga(0, bt_cfg(2));
    write_bt_ga(1, bt_cfg(4));
    // big towers fed through the pass-throughs
    select_chip(15);
    for (int i = 0; i < 200; i++) step(hits(8), 0, (i / 20) % 3 == 2);
    // 3. ray finding configuration
    foreach (ray_gas[i]) write_ray_ga(ray_gas[i], finder_cfg());
    // 4. events
    select_chip(15);
    for (int i = 0; i < 1500; i++) step(hits(20 + 10 * (i % 4)), 0, (i / 25) % 4 == 3);
    // latency: pads of one crossing reach the histogram after two edges
    repeat (3) step('0, 0, 0);
    begin
      logic [165:0] ev;
      ev = hits(60);
      step(ev, 0, 0);
      checks++;
      if (histogram !== 8'd0) begin failures++; $display("histogram before 2 edges"); end
      step('0, 0, 0);
      checks++;
      if (histogram == 8'd0) begin failures++; $display("no histogram after 2 edges"); end
      step('0, 0, 0);
      checks++;
      if (histogram !== 8'd0) begin failures++; $display("histogram not cleared"); end
    end
    $display("writes %0d (big tower %0d, via PE multiplexers %0d), inhibited %0d, 3-of-4 %0d, disabled %0d",
             n_write, n_bt_write, n_pe_mux, n_inhibit, n_3of4, n_disabled);
    $display("histogram nonzero %0d, big tower nonzero %0d, blanked by Bin Select %0d, long pipeline %0d, shifter steps %0d",
             n_hist, n_bt, n_blank, n_long, n_shift);
    checks += 11;
    if (n_shift == 0)    failures++;
    if (n_write == 0)    failures++;
    if (n_bt_write == 0) failures++;
    if (n_pe_mux == 0)   failures++;
    if (n_inhibit == 0)  failures++;
    if (n_3of4 == 0)     failures++;
    if (n_disabled == 0) failures++;
    if (n_hist == 0)     failures++;
    if (n_bt == 0)       failures++;
    if (n_blank == 0)    failures++;
    if (n_long == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
