// tb_iut_padder8: streams random operands through the pipelined adder, one
// per clock, and checks each sum appears exactly two clocks after its
// operands (the pipeline latency) with the right carry.
module tb_iut_padder8;
  logic clk = 0, cin = 0, cout;
  logic [7:0] a = 0, b = 0, sum;
  logic [8:0] expq[$];
  int checks = 0, failures = 0;
  iut_padder8 dut (.clk, .a, .b, .cin, .sum, .cout);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        checks++;
        if ({cout, sum} != expq[0]) begin
          failures++; $display("FAIL: vector %0d: %h vs %h", n - 2, {cout, sum}, expq[0]);
        end
        void'(expq.pop_front());
      end
      a = 8'($urandom); b = 8'($urandom); cin = 1'($urandom);
      expq.push_back(9'(a) + 9'(b) + 9'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
