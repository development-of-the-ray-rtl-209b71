// tb_ray_gate_array - the whole gate array against the cycle model in
// tb_model_pkg, compared on every clock:
//   1. programming through the pins with PE high (random configuration with
//      a few presets, disabled rays, ORs, length, Pipe Enable*),
//   2. normal operation with random pad hits (counts, 3 out of 4, ORs,
//      pipeline of the programmed length),
//   3. direct mode set through the Mode Control bit,
//   4. PE high as a plain pipeline (rays 24..31 in, 21..23 length, 20 enable),
//   5. Pipe Enable* low: ray 20 blanks the outputs in normal operation.
// Each mechanism is counted; one that never happens is a failure.
module tb_ray_gate_array;
  import tb_model_pkg::*;
  logic clk = 0, rst_n = 0, pe = 0;
  logic [44:0] pin = '0;
  logic [4:0]  h;
  logic [7:0]  dout;
  ga_state_t   m;
  int checks = 0, failures = 0;
  int n_write = 0, n_3of4 = 0, n_or = 0, n_direct = 0, n_pe_pipe = 0, n_blank = 0, n_len = 0;

  ray_gate_array dut (.aclk(clk), .pclk(clk), .rst_n(rst_n), .pe(pe), .pin(pin), .h(h), .dout(dout));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply pins/PE for one clock; model and compare after the edge
  task automatic step(input logic [44:0] p, input bit pe_v);
    @(negedge clk);
    pin = p;
    pe = pe_v;
    #1;
    if (!pe_v && m_used_3of4(p, m.cfg)) n_3of4++;
    if (!pe_v && m.cfg[0] && (m_rays(p, m.cfg, 0) != m_rays(p, m.cfg & ~236'd1, 0))) n_direct++;
    if (!pe_v && m_or(m_rays(p, m.cfg, 0), m.cfg) != 0) n_or++;
    @(posedge clk);
    m = m_ga_next(m, p, pe_v);
    #1;
    checks += 2;
    if (h !== m.h) begin
      failures++;
      if (failures < 10) $display("%0t h=%0d expected %0d", $time, h, m.h);
    end
    if (dout !== m_ga_dout(m, p, pe_v)) begin
      failures++;
      if (failures < 10) $display("%0t dout=%h expected %h", $time, dout, m_ga_dout(m, p, pe_v));
    end
    if (pe_v && dout != 0) n_pe_pipe++;
    if (!pe_v && !m.enq && m.stage[m.cfg[234:232]] != 0) n_blank++;
    if (!pe_v && m.cfg[234:232] > 0 && dout != 0) n_len++;
  endtask

  task automatic write_cfg(input logic [235:0] c);
    for (int a = 0; a < 30; a++) begin
      logic [7:0] d;
      d = 8'(c >> (a * 8));
      step(m_prog_pins(a, d), 1);
      n_write++;
      checks++;
      if (m.cfg[a*8 +: 4] !== d[3:0]) begin
        failures++;
        $display("address %0d not written", a);
      end
    end
  endtask

  function automatic logic [235:0] random_cfg(input bit direct, input bit pipe_en_n);
    logic [235:0] c;
    c = '0;
    c[0] = direct;
    for (int k = 1; k <= 31; k++) c[k] = ($urandom % 8) != 0;
    for (int k = 32; k <= 76; k++) c[k] = ($urandom % 6) == 0;
    for (int k = 77; k <= 231; k++) c[k] = ($urandom % 5) == 0;
    c[234:232] = 3'($urandom);
    c[235] = pipe_en_n;
    return c;
  endfunction

  function automatic logic [44:0] hits(input int density);
    logic [44:0] p;
    for (int k = 0; k < 45; k++) p[k] = ($urandom % 100) < density;
    return p;
  endfunction

  initial begin
    m = m_ga_reset();
    #12 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      write_cfg(random_cfg(0, 1));
      for (int i = 0; i < 300; i++) step(hits(40 + 10 * (i % 4)), 0);
    end
    // direct mode
    write_cfg(random_cfg(1, 1));
    for (int i = 0; i < 300; i++) step(hits(10), 0);
    // plain pipeline with PE high
    for (int i = 0; i < 300; i++) step(hits(30), 1);
    // Pipe Enable* low: ray 20 gates the outputs
    write_cfg(random_cfg(1, 0));
    for (int i = 0; i < 400; i++) step(hits(30), 0);
    $display("writes %0d, 3-of-4 %0d, OR %0d, direct %0d, PE pipeline %0d, blanked %0d, long pipe %0d",
             n_write, n_3of4, n_or, n_direct, n_pe_pipe, n_blank, n_len);
    checks += 7;
    if (n_write == 0)   failures++;
    if (n_3of4 == 0)    failures++;
    if (n_or == 0)      failures++;
    if (n_direct == 0)  failures++;
    if (n_pe_pipe == 0) failures++;
    if (n_blank == 0)   failures++;
    if (n_len == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
