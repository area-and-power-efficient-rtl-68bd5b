// transpose_buffer: real-time row-parallel transposition buffer placed
// between the row transform and the column transform.
//
// Rows of an N x N block arrive one per in_valid beat, all N elements in
// parallel (din[i] = element i of row r). Columns leave one per beat, all N
// elements in parallel (dout[m] = element m of column k). The storage is an
// N x N grid of registers, a row counter and N output multiplexers, each
// selecting one of N grid registers under the counter, followed by N output
// registers.
//
// To run at full rate with a single N x N grid the write direction alternates
// from block to block. A block written with its rows into grid columns
// (mode 0) is read back one grid row per beat; the beat that reads grid row k
// frees exactly the slot that the next block's row k needs, so that block is
// written into grid rows (mode 1) and is later read back one grid column per
// beat, and so on. Column k of a block is thus read in the same beat in which
// row k of the following block is written.
//
// Timing: the buffer advances only on in_valid. Column k of block b is
// presented at dout, with out_valid, in the cycle after row k of block b + 1
// was accepted. The last block therefore leaves as the next block (or N
// beats of any filler) enters. out_valid stays low while the first block fills.
//
// The grid of N x N registers, the counter, the N multiplexers and the output
// registers follow the design. The alternating write direction, which lets
// the grid be read while it is refilled, and the valid handshake are this
// implementation's choices.
//
// Interface: clk, rst_n (asynchronous, active low, clears the counter, the
// mode and the fill state), in_valid, din[N] in; out_valid, dout[N],
// col_idx (index k of the column on dout) out.
module transpose_buffer
  import dct_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  word_t                din  [N],
  output logic                 out_valid,
  output word_t                dout [N],
  output logic [$clog2(N)-1:0] col_idx
);

  localparam int unsigned CW = $clog2(N);

  word_t          grid [N][N];
  logic [CW-1:0]  cnt;      // row being written = column being read
  logic           wr_mode;  // 0: row -> grid column, 1: row -> grid row
  logic           full;     // the grid holds a complete earlier block
  word_t          col  [N];

  // ---- output multiplexers: the previous block was written in ~wr_mode ----
  always_comb begin
    for (int m = 0; m < N; m++) begin
      col[m] = wr_mode ? grid[cnt][m]   // previous block in grid columns
                       : grid[m][cnt];  // previous block in grid rows
    end
  end

  // ---- grid write ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < N; i++) begin
        if (wr_mode) grid[cnt][i] <= din[i];
        else         grid[i][cnt] <= din[i];
      end
    end
  end

  // ---- counter, mode and fill state ---------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      wr_mode <= 1'b0;
      full    <= 1'b0;
    end else if (in_valid) begin
      if (cnt == CW'(N - 1)) begin
        cnt     <= '0;
        wr_mode <= ~wr_mode;
        full    <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // ---- output registers ----------------------------------------------------
  always_ff @(posedge clk) begin
    if (in_valid) begin
      dout    <= col;
      col_idx <= cnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && full;
  end

endmodule
