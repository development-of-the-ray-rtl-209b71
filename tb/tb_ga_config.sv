// tb_ga_config - block 'Config': writes random bytes to random addresses with
// PE high, checks the 236-bit map against a model, checks that PE low and the
// non-existent addresses 30 and 31 change nothing and that a write takes
// effect at the AClk edge.
module tb_ga_config;
  logic aclk = 0, rst_n = 0, pe = 0;
  logic [12:0]  ray = '0;
  logic [235:0] cfg, model;
  int checks = 0, failures = 0;

  ga_config dut (.aclk(aclk), .rst_n(rst_n), .pe(pe), .ray(ray), .cfg(cfg));
  always #5 aclk = ~aclk;

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    checks++;
    if (cfg !== model) begin
      failures++;
      if (failures < 10) $display("%s: cfg=%h expected %h", what, cfg, model);
    end
  endtask

  initial begin
    model = '0;
    #12 rst_n = 1;
    #1 compare("after reset");
    for (int i = 0; i < 3000; i++) begin
      int a;
      logic [7:0] d;
      @(negedge aclk);
      a  = $urandom % 32;
      d  = 8'($urandom);
      pe = ($urandom % 4) != 0;
      ray[7:0]  = d;
      ray[12:8] = ~5'(a);
      #1 compare("before edge");
      @(posedge aclk) #1;
      if (pe && a < 30)
        for (int b = 0; b < 8; b++)
          if (a * 8 + b < 236) model[a*8+b] = d[b];
      compare("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
