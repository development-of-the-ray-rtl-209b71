// tb_rf_patch - patch area and programming multiplexers: random pads and
// random PE lines; every pin of the eight ray gate arrays must show the pad
// given by the patch tables (the multiplexed pad while that chip's PE is
// high), grounded pins must be low.
module tb_rf_patch;
  import rf_pkg::PATCH_CODE, rf_pkg::PATCH_PE_CODE;
  logic [165:0] pad;
  logic [7:0]   pe;
  logic [44:0]  pin [8];
  int checks = 0, failures = 0;

  rf_patch dut (.pad(pad), .pe(pe), .pin(pin));

  // bus index of pad code chamber*1000+pad (pads 1..147 of the prototype)
  function automatic int idx(input int code);
    int base [6] = '{0, 37, 76, 95, 114, 130};
    int first [6] = '{23, 22, 1, 1, 5, 4};
    if (code / 1000 == 9) return 150 + code % 1000;
    return base[code/1000-1] + code % 1000 - first[code/1000-1];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // spot checks: GA1 P11 is pad 1-23 (bus 0); GA6 P42 with PE is pad 1-55
    pad = '0; pe = '0; pad[0] = 1;
    #1 checks++; if (pin[0][0] !== 1'b1) begin failures++; $display("GA1 P11"); end
    pad = '0; pad[idx(1055)] = 1; pe[5] = 1;
    #1 checks++; if (pin[5][32] !== 1'b1) begin failures++; $display("GA6 P42 with PE"); end
    for (int i = 0; i < 2000; i++) begin
      pad = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      pe = 8'($urandom);
      #1;
      for (int g = 0; g < 8; g++)
        for (int j = 0; j < 45; j++) begin
          int code;
          logic e;
          code = (pe[g] && PATCH_PE_CODE[g][j] != 0) ? PATCH_PE_CODE[g][j] : PATCH_CODE[g][j];
          e = (code == 0) ? 1'b0 : pad[idx(code)];
          checks++;
          if (pin[g][j] !== e) begin
            failures++;
            if (failures < 10) $display("GA%0d pin %0d: %b expected %b", g + 1, j, pin[g][j], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
