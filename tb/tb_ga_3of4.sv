// tb_ga_3of4 - exhaustive test of one ray: all 2^11 combinations of the four
// pads, four presets, direct mode, direct pin and enable, against the rule
// "all four fired, or three fired and the missing one is preset".
module tb_ga_3of4;
  logic [3:0] w, p;
  logic d, dp, en, ray;
  int checks = 0, failures = 0;

  ga_3of4 dut (.wire_in(w), .preset(p), .direct(d), .dir_pin(dp), .enable(en), .ray(ray));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      int cnt;
      bit exp_r, spare;
      {en, dp, d, p, w} = 11'(v);
      #1;
      cnt = $countones(w);
      spare = |(p & ~w);
      exp_r = en && (cnt == 4 || (cnt == 3 && spare) || (d && dp));
      checks++;
      if (ray !== exp_r) begin
        failures++;
        if (failures < 10) $display("mismatch w=%b p=%b d=%b dp=%b en=%b ray=%b", w, p, d, dp, en, ray);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
