// tb_board_dead_pads - dead-pad workload on the full-size board (default
// parameters): single tracks are sent through the prototype board while a
// few pads are dead (never fire).
//   Phase A: '3 out of 4' presets off - a track crossing a dead pad is lost.
//   Phase B: the dead pads are preset in every chip that reads them - the
//            same tracks are found again.
// Each track is the four pads of a random ray of a random gate array; the
// expected histogram is computed from the pad tables and the ray/pin
// allocation (every ray on the board whose pads all fired, or all but one
// preset pad), two clock edges after the pads are presented.  Lost and
// recovered tracks are counted; none of either is a failure.
module tb_board_dead_pads;
  import rf_pkg::PATCH_CODE, rf_pkg::PATCH_PE_CODE, rf_pkg::RAY_PAD;
  import tb_model_pkg::*;

  logic clk = 0, rst_n = 0, strobe = 0, bin_select_n = 0;
  logic [165:0] pad_in = '0;
  logic [7:0]   histogram;
  logic [15:0]  big_tower;
  logic         ts_load = 0, ts_run = 0;
  logic [7:0]   ts_addr = '0, ts_data = '0;
  logic [191:0] ts_pattern;
  logic [165:0] dead;
  int checks = 0, failures = 0, n_lost = 0, n_recovered = 0, n_tracks = 0;
  int ray_gas [5] = '{0, 1, 2, 3, 5};

  ray_finder_board dut (
    .in_clk(clk), .a_clk(clk), .p_clk(clk), .rst_n(rst_n), .strobe(strobe),
    .bin_select_n(bin_select_n), .pad_in(pad_in), .histogram(histogram), .big_tower(big_tower),
    .ts_clk(clk), .ts_load(ts_load), .ts_load_addr(ts_addr), .ts_load_data(ts_data),
    .ts_run(ts_run), .ts_pattern(ts_pattern)
  );
  always #5 clk = ~clk;

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

  // pad of ray r (0-based) of chip g, corner c, in normal operation
  function automatic int ray_pad(input int g, input int r, input int c);
    return pad_of(g, m_pidx(RAY_PAD[r][c]), 0);
  endfunction

  // expected histogram for fired pads p, presets on dead pads if use_preset
  function automatic int expect_hist(input logic [165:0] p, input bit use_preset);
    int n;
    n = 0;
    foreach (ray_gas[i]) begin
      int g;
      g = ray_gas[i];
      for (int r = 0; r < 31; r++) begin
        int cnt;
        bit spare, wired;
        cnt = 0; spare = 0; wired = 1;
        for (int c = 0; c < 4; c++) begin
          int q;
          q = ray_pad(g, r, c);
          if (q < 0) wired = 0;
          else if (p[q]) cnt++;
          else if (use_preset && dead[q]) spare = 1;
        end
        if (wired && (cnt == 4 || (cnt == 3 && spare))) n++;
      end
    end
    return n;
  endfunction

  task automatic tick(input logic [165:0] p, input bit stb);
    @(negedge clk);
    pad_in = p;
    strobe = stb;
  endtask

  task automatic write_chip(input int g, input logic [235:0] c);
    logic [165:0] p;
    p = '0;
    {p[150], p[149], p[148], p[147]} = 4'(g);
    tick(p, 0);
    tick('0, 1);
    tick('0, 0);
    for (int a = 0; a < 30; a++) begin
      logic [44:0] want;
      want = m_prog_pins(a, 8'(c >> (a * 8)));
      p = '0;
      for (int j = 0; j < 45; j++)
        if (want[j] && pad_of(g, j, 1) >= 0) p[pad_of(g, j, 1)] = 1'b1;
      tick(p, 0);
    end
    tick('0, 0);
  endtask

  task automatic setup(input bit use_preset);
    foreach (ray_gas[i]) begin
      logic [235:0] c;
      c = '0;
      c[31:1] = '1;
      c[235] = 1'b1;
      if (use_preset)
        for (int j = 0; j < 45; j++)
          if (pad_of(ray_gas[i], j, 0) >= 0 && dead[pad_of(ray_gas[i], j, 0)]) c[32 + j] = 1'b1;
      write_chip(ray_gas[i], c);
    end
    begin
      logic [165:0] p;
      p = '0;
      {p[150], p[149], p[148], p[147]} = 4'hF;
      tick(p, 0);
      tick('0, 1);
      tick('0, 0);
    end
  endtask

  task automatic run_tracks(input bit use_preset, input int n);
    for (int t = 0; t < n; t++) begin
      int g, r, e;
      bit through_dead;
      logic [165:0] p;
      g = ray_gas[$urandom % 5];
      r = $urandom % 31;
      p = '0;
      through_dead = 0;
      for (int c = 0; c < 4; c++) begin
        int q;
        q = ray_pad(g, r, c);
        if (q >= 0) begin
          if (dead[q]) through_dead = 1;
          else p[q] = 1'b1;
        end
      end
      e = expect_hist(p, use_preset);
      tick(p, 0);
      tick('0, 0);
      @(posedge clk) #1;   // second edge after the pads were presented
      checks++;
      if (histogram !== 8'(e)) begin
        failures++;
        if (failures < 10) $display("chip %0d ray %0d: histogram %0d expected %0d", g + 1, r + 1, histogram, e);
      end
      if (through_dead) begin
        n_tracks++;
        if (!use_preset && e == 0) n_lost++;
        if (use_preset && histogram != 0) n_recovered++;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // about 2% of the 147 pads dead, chosen among pads used by rays
    dead = '0;
    while ($countones(dead) < 4) begin
      int g, r;
      g = ray_gas[$urandom % 5];
      r = $urandom % 31;
      if (ray_pad(g, r, $urandom % 4) >= 0) dead[ray_pad(g, r, $urandom % 4)] = 1'b1;
    end
    #12 rst_n = 1;
    setup(0);
    run_tracks(0, 600);
    setup(1);
    run_tracks(1, 600);
    $display("tracks through dead pads %0d, lost without preset %0d, found with preset %0d",
             n_tracks, n_lost, n_recovered);
    checks += 2;
    if (n_lost == 0) failures++;
    if (n_recovered == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
