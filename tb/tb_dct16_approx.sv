// tb_dct16_approx: streams random vectors, with random gaps, through dct16_approx and
// compares every output vector with the 16-point matrix product and its arrival with the
// 3-clock latency.
module tb_dct16_approx;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int NI = 16;
  localparam int LAT = 3;
  localparam int NVEC = 3000;

  typedef struct { int v [16]; int due; } exp_t;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  word_t xin [NI];
  word_t yout [NI];
  int checks = 0, failures = 0, cycle = 0, sent = 0, gaps = 0;
  exp_t q [$];

  dct16_approx dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xin),
             .out_valid(out_valid), .f(yout));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void reference(input int x [16], output int y [16]);
    dct1d(16, x, y);
  endfunction

  initial begin
    for (int i = 0; i < NI; i++) xin[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sent < NVEC || q.size() != 0) begin
      @(negedge clk);
      // check what the last edge produced
      if (out_valid) begin
        if (q.size() == 0) begin
          failures++; $display("FAIL unexpected out_valid at %0d", cycle);
        end else begin
          exp_t e;
          e = q.pop_front();
          checks++;
          if (e.due != cycle) begin
            failures++; $display("FAIL latency: due %0d got %0d", e.due, cycle);
          end
          for (int i = 0; i < NI; i++) begin
            checks++;
            if (int'(yout[i]) != e.v[i]) begin
              failures++;
              $display("FAIL out[%0d]=%0d want %0d", i, yout[i], e.v[i]);
            end
          end
        end
      end else if (q.size() != 0 && q[0].due <= cycle) begin
        failures++; $display("FAIL missing output due %0d", q[0].due);
        void'(q.pop_front());
      end
      // drive the next beat
      if (sent < NVEC && ($urandom_range(0, 3) != 0)) begin
        int xv [16];
        exp_t e;
        for (int i = 0; i < 16; i++) xv[i] = 0;
        for (int i = 0; i < NI; i++) begin
          xv[i] = (i % 3 == 0) ? int'(shortint'($urandom)) : $urandom_range(0, 4000) - 2000;
          xin[i] = word_t'(xv[i]);
        end
        reference(xv, e.v);
        e.due = cycle + LAT;
        q.push_back(e);
        in_valid = 1;
        sent++;
      end else begin
        in_valid = 0;
        if (sent < NVEC) gaps++;
      end
    end
    checks++;
    if (gaps == 0) begin failures++; $display("FAIL no input gap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
