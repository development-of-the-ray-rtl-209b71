// tb_ga_adder - block 'Adder': the registered output must equal the number of
// true rays one AClk cycle later (all zero, all ones, each single ray, random).
module tb_ga_adder;
  logic aclk = 0, rst_n = 0;
  logic [30:0] ray;
  logic [4:0]  h;
  int checks = 0, failures = 0;

  ga_adder dut (.aclk(aclk), .rst_n(rst_n), .ray(ray), .h(h));
  always #5 aclk = ~aclk;

  initial begin
    repeat (5000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [30:0] r);
    int exp_h;
    @(negedge aclk) ray = r;
    exp_h = $countones(r);
    @(posedge aclk) #1;
    checks++;
    if (h !== 5'(exp_h)) begin
      failures++;
      $display("rays %h: h=%0d expected %0d", r, h, exp_h);
    end
  endtask

  initial begin
    ray = '0;
    #12 rst_n = 1;
    apply('0);
    apply('1);
    for (int i = 0; i < 31; i++) apply(31'(1) << i);
    for (int i = 0; i < 1000; i++) apply($urandom);
    // latency: h must not change before the clock edge
    @(negedge aclk) ray = '1;
    @(posedge aclk) #1;
    @(negedge aclk) ray = '0;
    #1 checks++;
    if (h !== 5'd31) begin failures++; $display("h changed before AClk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
