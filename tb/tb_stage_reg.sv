// tb_stage_reg: checks that the stage register returns each input one clock later.
module tb_stage_reg;
  localparam int W = 16;
  logic clk = 0;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  stage_reg #(.W(W)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 16'h0;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      d = 16'($urandom);
      prev = d;
      @(negedge clk);
      checks++;
      if (q !== prev) begin
        failures++;
        $display("FAIL q=%h want %h", q, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
