// tb_rf_chip_select - chip-select decoder: reset state (address 15), strobe
// loads the address, without strobe it holds, inhibit clears all outputs.
module tb_rf_chip_select;
  logic clk = 0, rst_n = 0, strobe = 0, inhibit = 0;
  logic [3:0]  addr_in = '0, model;
  logic [15:0] sel;
  int checks = 0, failures = 0;

  rf_chip_select dut (.clk(clk), .rst_n(rst_n), .strobe(strobe), .inhibit(inhibit),
                      .addr_in(addr_in), .sel(sel));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 4'hF;
    #12 rst_n = 1;
    #1 checks++;
    if (sel !== 16'h8000) begin failures++; $display("reset: %h", sel); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      strobe  = $urandom % 2;
      inhibit = ($urandom % 4) == 0;
      addr_in = 4'($urandom);
      @(posedge clk) #1;
      if (strobe) model = addr_in;
      checks++;
      if (sel !== (inhibit ? 16'h0 : 16'h1 << model)) begin
        failures++;
        $display("sel=%h expected address %0d inhibit %b", sel, model, inhibit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
