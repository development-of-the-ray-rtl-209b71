// tb_rf_hist_adder - histogram adder: sum of eight 5-bit counts, including
// the largest sum 8 x 31 = 248, against a plain sum.
module tb_rf_hist_adder;
  logic [4:0] h [8];
  logic [7:0] sum;
  int checks = 0, failures = 0;

  rf_hist_adder dut (.h(h), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int total;
      total = 0;
      for (int k = 0; k < 8; k++) begin
        h[k] = (i == 0) ? 5'd31 : (i == 1) ? 5'd0 : 5'($urandom % 32);
        total += h[k];
      end
      #1 checks++;
      if (sum !== 8'(total)) begin failures++; $display("sum=%0d expected %0d", sum, total); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
