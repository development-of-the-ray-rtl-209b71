// tb_model_pkg - reference model of the ray finder gate array for the
// testbenches, written independently of the RTL's structure: each function
// computes a result directly from the definitions (pin allocation, '3 out of
// 4' rule, OR ranges, configuration bit map).
package tb_model_pkg;
  import rf_pkg::RAY_PAD, rf_pkg::RAY_DIRECT;

  // pin index of code chamber*100+pad
  function automatic int m_pidx(input int code);
    int ch, n;
    ch = code / 100;
    n  = code % 100;
    if (ch == 1) return n - 1;
    if (ch == 2) return n + 7;
    if (ch == 3) return n + 16;
    return n + 30;
  endfunction

  // rays of one chip
  function automatic logic [30:0] m_rays(input logic [44:0] pins, input logic [235:0] cfg,
                                         input bit pe);
    logic [30:0] r;
    for (int k = 0; k < 31; k++) begin
      int cnt;
      bit spare, fired, dir;
      cnt = 0;
      spare = 0;
      for (int c = 0; c < 4; c++) begin
        int p;
        p = m_pidx(RAY_PAD[k][c]);
        if (pins[p]) cnt++;
        else if (cfg[32 + p]) spare = 1;
      end
      fired = (cnt == 4) || (cnt == 3 && spare);
      dir   = (pe || cfg[0]) && pins[m_pidx(RAY_DIRECT[k])];
      r[k]  = (pe || cfg[1 + k]) && (fired || dir);
    end
    return r;
  endfunction

  // true when some ray is true only thanks to a preset pad
  function automatic bit m_used_3of4(input logic [44:0] pins, input logic [235:0] cfg);
    for (int k = 0; k < 31; k++) begin
      int cnt;
      bit spare;
      cnt = 0;
      spare = 0;
      for (int c = 0; c < 4; c++) begin
        int p;
        p = m_pidx(RAY_PAD[k][c]);
        if (pins[p]) cnt++;
        else if (cfg[32 + p]) spare = 1;
      end
      if (cnt == 3 && spare && cfg[1 + k]) return 1;
    end
    return 0;
  endfunction

  // programmable ORs
  function automatic logic [7:0] m_or(input logic [30:0] ray, input logic [235:0] cfg);
    int lo [8] = '{1, 1, 1, 1, 1, 9, 17, 25};
    int hi [8] = '{8, 16, 24, 31, 31, 31, 31, 31};
    int b;
    logic [7:0] o;
    b = 77;
    o = '0;
    for (int p = 0; p < 8; p++)
      for (int r = lo[p]; r <= hi[p]; r++) begin
        if (cfg[b] && ray[r-1]) o[p] = 1'b1;
        b++;
      end
    return o;
  endfunction

  // configuration bit of 'ray r to pipe p' (1-based), -1 if none
  function automatic int m_or_bit(input int r, input int p);
    int lo [8] = '{1, 1, 1, 1, 1, 9, 17, 25};
    int hi [8] = '{8, 16, 24, 31, 31, 31, 31, 31};
    int b;
    b = 77;
    for (int q = 1; q < p; q++) b += hi[q-1] - lo[q-1] + 1;
    if (r < lo[p-1] || r > hi[p-1]) return -1;
    return b + r - lo[p-1];
  endfunction

  // cycle model of one gate array
  typedef struct {
    logic [235:0] cfg;
    logic [7:0]   stage [8];
    logic         enq;
    logic [4:0]   h;
  } ga_state_t;

  function automatic ga_state_t m_ga_reset();
    ga_state_t s;
    s.cfg = '0;
    for (int k = 0; k < 8; k++) s.stage[k] = '0;
    s.enq = 0;
    s.h = '0;
    return s;
  endfunction

  // pipeline outputs seen with the current state and pins
  function automatic logic [7:0] m_ga_dout(input ga_state_t s, input logic [44:0] pins,
                                           input bit pe);
    logic [30:0] r;
    int len;
    r = m_rays(pins, s.cfg, pe);
    len = pe ? int'(r[22:20]) : int'(s.cfg[234:232]);
    return s.enq ? s.stage[len] : 8'h00;
  endfunction

  // state after one rising clock edge (AClk and PClk together)
  function automatic ga_state_t m_ga_next(input ga_state_t s, input logic [44:0] pins,
                                          input bit pe);
    ga_state_t n;
    logic [30:0] r;
    int addr;
    n = s;
    r = m_rays(pins, s.cfg, pe);
    n.h = 5'($countones(r));
    if (pe) begin
      addr = int'(~r[12:8]) & 31;
      if (addr < 30)
        for (int b = 0; b < 8; b++)
          if (addr * 8 + b < 236) n.cfg[addr*8+b] = r[b];
    end
    n.stage[0] = pe ? r[30:23] : m_or(r, s.cfg);
    for (int k = 1; k < 8; k++) n.stage[k] = s.stage[k-1];
    n.enq = !((pe || !s.cfg[235]) && r[19]);
    return n;
  endfunction

  // direct-mode pin (index) of ray r (1-based)
  function automatic int m_dpin(input int r);
    return m_pidx(RAY_DIRECT[r-1]);
  endfunction

  // pins that write 'data' to configuration address 'addr' in programming mode
  function automatic logic [44:0] m_prog_pins(input int addr, input logic [7:0] data);
    logic [44:0] p;
    p = '0;
    for (int b = 0; b < 8; b++) p[m_dpin(b + 1)] = data[b];
    for (int a = 0; a < 5; a++) p[m_dpin(9 + a)] = !addr[a];
    return p;
  endfunction
endpackage
