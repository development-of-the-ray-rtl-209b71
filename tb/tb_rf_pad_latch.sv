// tb_rf_pad_latch - input latches: random 166-bit patterns must appear one
// InClk edge after they are applied and stay stable between edges.
module tb_rf_pad_latch;
  logic clk = 0, rst_n = 0;
  logic [165:0] d, q, prev;
  int checks = 0, failures = 0;

  rf_pad_latch dut (.in_clk(clk), .rst_n(rst_n), .pad_in(d), .pad_q(q));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      prev = d;
      d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1 checks++;
      if (i > 0 && q !== prev) begin failures++; $display("changed before the edge"); end
      @(posedge clk) #1;
      checks++;
      if (q !== d) begin failures++; $display("q=%h expected %h", q, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
