// dct2d_approx: two-dimensional N x N approximate DCT, the row transform,
// a transposition buffer and the column transform in a chain.
//
// An N x N block of 8-bit pixels enters one row per in_valid beat
// (pix[i] = s(r, i), pixel i of row r), rows 0..N-1 in order, blocks back to
// back or with gaps between beats. The first 1D approximate DCT transforms
// each row; the transposition buffer turns the row results into columns;
// the second, identical 1D approximate DCT transforms each column. For
// N = 16 the 1D units are dct16_approx (40 additions each), for N = 8
// dct8_approx (12 additions each); no multiplier is used anywhere.
//
// Output: with T the N-point 0/+1/-1 transform matrix and S the pixel block,
// the block result is Z = T * S * T'. Beat k of a block's output
// (coef_valid, with col_idx = k) carries column k of Z: coef[v] = Z[v][k].
// Pixels are zero-extended to the 16-bit word; coefficients are 16-bit
// two's complement and cannot overflow for 8-bit pixels. The scaling
// diagonal of the approximation is not applied.
//
// Timing: one row per clock at full rate. Column k of block b leaves
// 2 * L1 + 1 clocks after row k of block b + 1 enters, where L1 is the 1D
// latency (3 for N = 16, 2 for N = 8); so the last block is pushed out by
// the next one or by N filler rows.
//
// The chain row DCT -> transposition buffer -> column DCT, identical 1D
// transforms in both passes and the 16-point default follow the design;
// the pixel format and the valid handshake are this implementation's.
//
// Interface: clk, rst_n (asynchronous, active low), in_valid, pix[N] in;
// coef_valid, coef[N], col_idx out.
module dct2d_approx
  import dct_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned PIX_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [PIX_W-1:0]     pix  [N],
  output logic                 coef_valid,
  output word_t                coef [N],
  output logic [$clog2(N)-1:0] col_idx
);

  word_t row_in  [N];
  word_t row_out [N];
  word_t col_in  [N];
  logic  row_valid;
  logic  col_valid;
  logic [$clog2(N)-1:0] tb_idx;

  for (genvar i = 0; i < N; i++) begin : g_ext
    assign row_in[i] = word_t'({{(DATA_W-PIX_W){1'b0}}, pix[i]});
  end

  if (N == 16) begin : g_n16
    dct16_approx u_row (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(row_in),
      .out_valid(row_valid), .f(row_out)
    );
    dct16_approx u_col (
      .clk(clk), .rst_n(rst_n), .in_valid(col_valid), .x(col_in),
      .out_valid(coef_valid), .f(coef)
    );
  end else if (N == 8) begin : g_n8
    dct8_approx u_row (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(row_in),
      .out_valid(row_valid), .y(row_out)
    );
    dct8_approx u_col (
      .clk(clk), .rst_n(rst_n), .in_valid(col_valid), .x(col_in),
      .out_valid(coef_valid), .y(coef)
    );
  end else begin : g_bad
    $error("dct2d_approx: N must be 8 or 16");
  end

  transpose_buffer #(.N(N)) u_tpose (
    .clk(clk), .rst_n(rst_n), .in_valid(row_valid), .din(row_out),
    .out_valid(col_valid), .dout(col_in), .col_idx(tb_idx)
  );

  // column index travels beside the column transform (latency 2 or 3)
  localparam int unsigned L1 = (N == 16) ? 3 : 2;
  logic [$clog2(N)-1:0] idx_q [3];

  always_ff @(posedge clk) begin
    idx_q[0] <= tb_idx;
    idx_q[1] <= idx_q[0];
    idx_q[2] <= idx_q[1];
  end

  assign col_idx = idx_q[L1-1];

endmodule
