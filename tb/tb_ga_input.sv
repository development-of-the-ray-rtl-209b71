// tb_ga_input - block 'Input': random pins, presets, enables and mode against
// the reference model, plus hand-written checks of rays 1, 25 and 31.
module tb_ga_input;
  import tb_model_pkg::*;
  logic [44:0] pin, preset;
  logic [30:0] enable, ray;
  logic        direct;
  logic [235:0] cfg;
  int checks = 0, failures = 0;

  ga_input dut (.pin(pin), .preset(preset), .enable(enable), .direct(direct), .ray(ray));

  task automatic check(input logic [30:0] exp_r, input string what);
    checks++;
    if (ray !== exp_r) begin
      failures++;
      $display("%s: ray=%h expected %h", what, ray, exp_r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ray 1 = P11 P21 P31 P41 (pins 0, 8, 17, 31)
    pin = '0; preset = '0; enable = '1; direct = 0;
    pin[0] = 1; pin[8] = 1; pin[17] = 1; pin[31] = 1;
    #1 check(31'h1, "ray 1 only");
    // ray 2 shares P11, P31, P41, needs P22 (pin 9)
    pin[9] = 1;
    #1 check(31'h3, "rays 1 and 2");
    // remove P21: ray 1 now 3 of 4; preset P21 (pin 8) revives it
    pin[8] = 0;
    #1 check(31'h2, "ray 1 lost");
    preset[8] = 1;
    #1 check(31'h3, "ray 1 by preset");
    // ray 31 = P18 P29 P314 P414 (pins 7, 16, 30, 44), disabled
    pin = '0; preset = '0;
    pin[7] = 1; pin[16] = 1; pin[30] = 1; pin[44] = 1;
    enable[30] = 0;
    #1 check(31'h0, "ray 31 disabled");
    enable[30] = 1;
    #1 check(31'h4000_0000, "ray 31");
    // direct mode: ray 25 follows P27 (pin 14)
    pin = '0; direct = 1; pin[14] = 1;
    #1 check(31'h0100_0000, "ray 25 direct");
    for (int i = 0; i < 3000; i++) begin
      pin = {$urandom, $urandom};
      if (i % 2 == 0) pin = pin | {$urandom, $urandom};  // denser
      preset = {$urandom, $urandom} & {$urandom, $urandom};
      enable = $urandom | $urandom;
      direct = ($urandom % 4) == 0;
      cfg = '0;
      cfg[0] = direct;
      cfg[31:1] = enable;
      cfg[76:32] = preset;
      #1 check(m_rays(pin, cfg, 1'b0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
