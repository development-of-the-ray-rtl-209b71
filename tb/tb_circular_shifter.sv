// tb_circular_shifter - test pattern generator: loads 192 random bytes, runs
// it and checks that each output follows its byte bit by bit (bit 0 first)
// and repeats every 8th clock; stopping 'run' freezes the pattern.
module tb_circular_shifter;
  logic clk = 0, rst_n = 0, load = 0, run = 0;
  logic [7:0]   addr = '0;
  logic [7:0]   data = '0;
  logic [191:0] pattern, held;
  logic [7:0]   mem [192];
  int checks = 0, failures = 0;

  circular_shifter dut (.clk(clk), .rst_n(rst_n), .load(load), .load_addr(addr),
                        .load_data(data), .run(run), .pattern(pattern));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 192; i++) begin
      @(negedge clk);
      load = 1; addr = 8'(i); data = 8'($urandom); mem[i] = data;
    end
    @(negedge clk) load = 0; run = 1;
    for (int t = 0; t < 40; t++) begin
      #1;
      for (int i = 0; i < 192; i++) begin
        checks++;
        if (pattern[i] !== mem[i][t % 8]) begin
          failures++;
          if (failures < 10) $display("t=%0d reg %0d: %b", t, i, pattern[i]);
        end
      end
      @(negedge clk);
    end
    run = 0;
    held = pattern;
    repeat (5) @(negedge clk);
    checks++;
    if (pattern !== held) begin failures++; $display("pattern moved while stopped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
