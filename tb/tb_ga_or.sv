// tb_ga_or - block 'OR': single ray / single bit checks of the programming map
// and random rays and programming against the reference model.
module tb_ga_or;
  import tb_model_pkg::*;
  logic [30:0]  ray;
  logic [154:0] cfg_or;
  logic [7:0]   pipe;
  logic [235:0] cfg;
  int checks = 0, failures = 0;

  ga_or dut (.ray(ray), .cfg_or(cfg_or), .pipe(pipe));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // every (ray, pipe) pair on its own
    for (int r = 1; r <= 31; r++)
      for (int p = 1; p <= 8; p++) begin
        int b;
        b = m_or_bit(r, p);
        ray = 31'(1) << (r - 1);
        cfg_or = '0;
        if (b >= 0) cfg_or[b - 77] = 1'b1;
        #1 checks++;
        if (pipe !== ((b >= 0) ? 8'(1) << (p - 1) : 8'h00)) begin
          failures++;
          $display("ray %0d pipe %0d: %b", r, p, pipe);
        end
      end
    // ray 8 reaches pipe 1, ray 9 does not; ray 24 reaches pipe 3, ray 25 pipe 8
    ray = 31'h80; cfg_or = '1;
    #1 checks++; if (pipe !== 8'b0001_1111) begin failures++; $display("ray 8: %b", pipe); end
    ray = 31'h100;
    #1 checks++; if (pipe !== 8'b0011_1110) begin failures++; $display("ray 9: %b", pipe); end
    ray = 31'h0100_0000;
    #1 checks++; if (pipe !== 8'b1111_1000) begin failures++; $display("ray 25: %b", pipe); end
    for (int i = 0; i < 2000; i++) begin
      ray = $urandom & $urandom & $urandom;
      cfg = '0;
      for (int k = 77; k < 232; k++) cfg[k] = ($urandom % 8) == 0;
      cfg_or = cfg[231:77];
      #1 checks++;
      if (pipe !== m_or(ray, cfg)) begin
        failures++;
        $display("random: %b expected %b", pipe, m_or(ray, cfg));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
