// tb_iut_adder4: exhaustive check of the 4-bit adder (all 512 input
// combinations) against the arithmetic sum.
module tb_iut_adder4;
  logic [3:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;
  iut_adder4 dut (.a, .b, .cin, .sum, .cout);
  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, b, a} = 9'(v);
      #1;
      checks++;
      if ({cout, sum} != 5'(a) + 5'(b) + 5'(cin)) begin
        failures++; $display("FAIL: %h+%h+%0d gave %h", a, b, cin, {cout, sum});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
