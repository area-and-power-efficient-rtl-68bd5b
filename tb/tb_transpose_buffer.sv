// tb_transpose_buffer: writes random N x N blocks row by row, with random
// gaps between beats, and checks that column k of block b leaves, with
// out_valid and col_idx = k, in the cycle after row k of block b + 1 was
// accepted. Blocks alternate between the two write directions of the grid
// (even blocks in one, odd blocks in the other); the test counts the blocks
// of each parity that were read back without error.
module tb_transpose_buffer;
  import dct_pkg::*;

  localparam int N = 16;
  localparam int NBLK = 12;

  typedef struct { int v [N]; int k; int due; int b; } exp_t;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  word_t din [N];
  word_t dout [N];
  logic [$clog2(N)-1:0] col_idx;
  int checks = 0, failures = 0, cycle = 0, gaps = 0;
  int blk [NBLK][N][N];
  int mode_blocks [2] = '{0, 0};
  int col_ok [NBLK];
  exp_t q [$];

  transpose_buffer #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
    .out_valid(out_valid), .dout(dout), .col_idx(col_idx)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #500000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    if (out_valid) begin
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected out_valid at %0d", cycle);
      end else begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (e.due != cycle || int'(col_idx) != e.k) begin
          failures++;
          $display("FAIL timing/index: due %0d got %0d, k %0d got %0d", e.due, cycle, e.k, col_idx);
        end
        begin
          bit ok = (e.due == cycle) && (int'(col_idx) == e.k);
          for (int m = 0; m < N; m++) begin
            checks++;
            if (int'(dout[m]) != e.v[m]) begin
              ok = 0;
              failures++; $display("FAIL col %0d out[%0d]=%0d want %0d", e.k, m, dout[m], e.v[m]);
            end
          end
          if (ok) col_ok[e.b]++;
          if (col_ok[e.b] == N) mode_blocks[e.b % 2]++;
        end
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      failures++; $display("FAIL missing column due %0d", q[0].due);
      void'(q.pop_front());
    end
  endtask

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) blk[b][r][c] = int'(shortint'($urandom));
    for (int i = 0; i < N; i++) din[i] = '0;
    for (int b = 0; b < NBLK; b++) col_ok[b] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < N; r++) begin
        // random idle beats before this row
        while ($urandom_range(0, 4) == 0) begin
          @(negedge clk);
          check_out();
          in_valid = 0;
          gaps++;
        end
        @(negedge clk);
        check_out();
        for (int i = 0; i < N; i++) din[i] = word_t'(blk[b][r][i]);
        in_valid = 1;
        if (b > 0) begin
          exp_t e;
          for (int m = 0; m < N; m++) e.v[m] = blk[b-1][m][r];
          e.k = r;
          e.b = b - 1;
          e.due = cycle + 1;
          q.push_back(e);
        end
      end
    end
    @(negedge clk);
    check_out();
    in_valid = 0;
    repeat (3) begin @(negedge clk); check_out(); end
    checks += 3;
    if (q.size() != 0) begin failures++; $display("FAIL %0d columns never came", q.size()); end
    if (gaps == 0) begin failures++; $display("FAIL no gap"); end
    if (mode_blocks[0] == 0 || mode_blocks[1] == 0) begin
      failures++; $display("FAIL write direction not switched");
    end
    $display("blocks per write direction: %0d %0d, idle beats %0d", mode_blocks[0], mode_blocks[1], gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
