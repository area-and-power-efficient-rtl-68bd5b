// tb_dct2d_approx: end-to-end test of the 16 x 16 two-dimensional approximate DCT at its default parameters.
//
// Random 8-bit pixel blocks (plus an all-255 block and a checkerboard of 0
// and 255 for the largest coefficients) enter one row per beat. Every output
// beat is compared with column k of Z = T * S * T' from the reference model,
// and its timing with the expected latency: column k of block b leaves
// 2 * L1 + 1 clocks after row k of block b + 1 entered. A block of zero rows
// at the end pushes the last data block out. The test counts, and requires
// at least once: blocks sent back to back, idle beats inside a block, blocks
// verified in each of the two write directions of the transposition buffer,
// and the final flush.
module tb_dct2d_approx;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int N = 16;
  localparam int L1 = (N == 16) ? 3 : 2;
  localparam int NBLK = 10;     // data blocks, then one filler block

  typedef struct { int v [N]; int k; int due; int b; } exp_t;

  logic clk = 0, rst_n = 0, in_valid = 0, coef_valid;
  logic [7:0] pix [N];
  word_t coef [N];
  logic [$clog2(N)-1:0] col_idx;
  int checks = 0, failures = 0, cycle = 0;
  int n_gap = 0, n_b2b = 0, n_flush = 0;
  int dir_ok [2] = '{0, 0};
  int col_ok [NBLK + 1];
  int s [16][16];
  int z [NBLK + 1][16][16];
  int pixels [NBLK + 1][16][16];
  exp_t q [$];

  dct2d_approx dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pix(pix),
    .coef_valid(coef_valid), .coef(coef), .col_idx(col_idx)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    if (coef_valid) begin
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected coef_valid at %0d", cycle);
      end else begin
        exp_t e;
        bit ok;
        e = q.pop_front();
        checks++;
        ok = (e.due == cycle) && (int'(col_idx) == e.k);
        if (!ok) begin
          failures++;
          $display("FAIL timing/index: due %0d got %0d, k %0d got %0d", e.due, cycle, e.k, col_idx);
        end
        for (int v = 0; v < N; v++) begin
          checks++;
          if (int'(coef[v]) != e.v[v]) begin
            ok = 0;
            failures++;
            $display("FAIL block %0d Z[%0d][%0d]=%0d want %0d", e.b, v, e.k, coef[v], e.v[v]);
          end
        end
        if (ok) col_ok[e.b]++;
        if (col_ok[e.b] == N) dir_ok[e.b % 2]++;
      end
    end else if (q.size() != 0 && q[0].due <= cycle) begin
      failures++; $display("FAIL missing column due %0d", q[0].due);
      void'(q.pop_front());
    end
  endtask

  initial begin
    for (int b = 0; b <= NBLK; b++) begin
      col_ok[b] = 0;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          if (b == NBLK)      pixels[b][r][c] = 0;                 // filler
          else if (b == 1)    pixels[b][r][c] = 255;
          else if (b == 2)    pixels[b][r][c] = ((r + c) % 2) ? 255 : 0;
          else                pixels[b][r][c] = $urandom_range(0, 255);
          s[r][c] = (r < N && c < N) ? pixels[b][r][c] : 0;
        end
      dct2d(N, s, z[b]);
    end
    for (int i = 0; i < N; i++) pix[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b <= NBLK; b++) begin
      for (int r = 0; r < N; r++) begin
        // blocks 0..3 run at full rate, later ones get random idle beats
        if (b >= 4 && b < NBLK) begin
          while ($urandom_range(0, 5) == 0) begin
            @(negedge clk);
            check_out();
            in_valid = 0;
            n_gap++;
          end
        end
        @(negedge clk);
        check_out();
        if (r == 0 && b > 0 && in_valid) n_b2b++;
        for (int i = 0; i < N; i++) pix[i] = 8'(pixels[b][r][i]);
        in_valid = 1;
        if (b > 0) begin
          exp_t e;
          for (int v = 0; v < N; v++) e.v[v] = z[b-1][v][r];
          e.k = r;
          e.b = b - 1;
          e.due = cycle + 2 * L1 + 1;
          q.push_back(e);
          if (b == NBLK) n_flush++;
        end
      end
    end
    @(negedge clk);
    check_out();
    in_valid = 0;
    repeat (2 * L1 + 4) begin @(negedge clk); check_out(); end
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d columns never came", q.size()); end
    checks += 4;
    if (n_gap == 0)   begin failures++; $display("FAIL no idle beat"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back blocks"); end
    if (n_flush != N) begin failures++; $display("FAIL flush incomplete"); end
    if (dir_ok[0] == 0 || dir_ok[1] == 0) begin
      failures++; $display("FAIL a buffer write direction never verified");
    end
    $display("N=%0d: back-to-back block starts %0d, idle beats %0d, blocks verified per buffer direction %0d/%0d, flush beats %0d",
             N, n_b2b, n_gap, dir_ok[0], dir_ok[1], n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
