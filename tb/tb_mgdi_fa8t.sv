// tb_mgdi_fa8t: exhaustive test of the full adder cell against a + b + cin.
module tb_mgdi_fa8t;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  mgdi_fa8t dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int total;
      {a, b, cin} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d sum=%0d", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
