// tb_ga_pipeline - block 'Pipeline': random data through every length 1..8,
// output must equal the input len+1 clocks earlier; the active-low enable
// must blank the outputs from the next clock on.
module tb_ga_pipeline;
  logic pclk = 0, rst_n = 0;
  logic [7:0] din, dout;
  logic [2:0] len;
  logic       en_n;
  logic [7:0] hist [$];
  int checks = 0, failures = 0;

  ga_pipeline dut (.pclk(pclk), .rst_n(rst_n), .din(din), .len(len), .en_n(en_n), .dout(dout));
  always #5 pclk = ~pclk;

  initial begin
    repeat (20000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit en_q;
    din = 0; len = 0; en_n = 0;
    #12 rst_n = 1;
    en_q = 0;
    for (int i = 0; i < 16; i++) hist.push_front(8'h00);  // reset contents
    for (int l = 0; l < 8; l++) begin
      len = 3'(l);
      for (int c = 0; c < 200; c++) begin
        @(negedge pclk);
        din  = 8'($urandom);
        en_n = ($urandom % 10) == 0;
        @(posedge pclk);
        hist.push_front(din);
        en_q = !en_n;
        #1;
        // after this edge stage[k] = hist[k]
        checks++;
        if (dout !== (en_q ? hist[l] : 8'h00)) begin
          failures++;
          if (failures < 10) $display("len %0d: dout=%h expected %h", l + 1, dout, en_q ? hist[l] : 8'h00);
        end
        if (hist.size() > 20) void'(hist.pop_back());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
