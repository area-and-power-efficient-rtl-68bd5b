// tb_rca_addsub: random and corner-case test of the 16-bit ripple carry
// adder/subtractor against integer addition and subtraction.
module tb_rca_addsub;
  localparam int W = 16;
  logic [W-1:0] a, b, y;
  logic sub, cout;
  int checks = 0, failures = 0;

  rca_addsub #(.W(W)) dut (.a(a), .b(b), .sub(sub), .y(y), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(logic [W-1:0] ta, logic [W-1:0] tb, logic ts);
    longint unsigned ref_v;
    a = ta; b = tb; sub = ts;
    #1;
    if (ts) ref_v = longint'(ta) + longint'(~tb & 16'hFFFF) + 1;
    else    ref_v = longint'(ta) + longint'(tb);
    checks++;
    if ({cout, y} != 17'(ref_v)) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d -> cout=%0d y=%h (want %h)", ta, tb, ts, cout, y, 17'(ref_v));
    end
  endtask

  initial begin
    check_one(16'h0000, 16'h0000, 0);
    check_one(16'hFFFF, 16'h0001, 0);
    check_one(16'h7FFF, 16'h0001, 0);
    check_one(16'h0000, 16'h0001, 1);
    check_one(16'h8000, 16'h0001, 1);
    check_one(16'h1234, 16'h1234, 1);
    for (int i = 0; i < 4000; i++)
      check_one(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
