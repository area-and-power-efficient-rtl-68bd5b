// dct8_approx: 8-point approximate 1D DCT that needs 12 additions and no
// multiplications or shifts.
//
// The transform is y = T8 * x with the 0/+1/-1 matrix
//   y0 = x0 + x7                    y4 = x2 + x3 - x4 - x5
//   y1 = x0 + x1 + x6 + x7          y5 = x2 - x5
//   y2 = x2 + x5                    y6 = x0 + x1 - x6 - x7
//   y3 = x2 + x3 + x4 + x5          y7 = x0 - x7
// (the output scaling diag(1/2, ..., 1/2) of the approximation is left out,
// as is usual; it can be folded into a later quantiser).
// Stage I is a butterfly of 8 adders: s_i = x_i + x_(7-i) and
// d_i = x_i - x_(7-i) for i = 0..3. Stage II adds pairs with 4 more adders:
// y1 = s0 + s1, y3 = s2 + s3, y4 = d3 + d2, y6 = d0 + d1; y0, y2, y5, y7 are
// s0, s2, d2, d0 passed on. Each stage ends in a register bank, so a vector
// presented with in_valid appears at y two clocks later with out_valid.
// Every adder is a 16-bit ripple carry adder/subtractor (rca_addsub).
//
// The matrix, the two stages and the 12 adders follow the design. The
// registers on the four pass-through rows of stage II are this
// implementation's choice, made so that all eight outputs leave in the same
// cycle; the valid flag and its reset are also this implementation's.
//
// Interface: clk, rst_n (asynchronous, active low, clears the valid flags),
// in_valid, x[8] in; out_valid, y[8] out. Throughput one vector per clock,
// latency 2 clocks. Arithmetic wraps at DATA_W bits.
module dct8_approx
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x [8],
  output logic  out_valid,
  output word_t y [8]
);

  // Carry outs of the 12 adders: results wrap at DATA_W bits.
  logic [11:0] cout_unused;

  // ---- stage I: butterfly, 4 additions and 4 subtractions ----------------
  word_t s1_d [8];  // [0..3] = sums s0..s3, [4..7] = differences d0..d3
  word_t s1_q [8];

  for (genvar i = 0; i < 4; i++) begin : g_bfly
    rca_addsub #(.W(DATA_W)) u_sum (
      .a(x[i]), .b(x[7-i]), .sub(1'b0), .y(s1_d[i]), .cout(cout_unused[i])
    );
    rca_addsub #(.W(DATA_W)) u_dif (
      .a(x[i]), .b(x[7-i]), .sub(1'b1), .y(s1_d[4+i]), .cout(cout_unused[4+i])
    );
  end

  for (genvar i = 0; i < 8; i++) begin : g_reg1
    stage_reg #(.W(DATA_W)) u_reg (.clk(clk), .d(s1_d[i]), .q(s1_q[i]));
  end

  // ---- stage II: 4 additions --------------------------------------------
  word_t s2_d [8];

  rca_addsub #(.W(DATA_W)) u_y1 (.a(s1_q[0]), .b(s1_q[1]), .sub(1'b0), .y(s2_d[1]), .cout(cout_unused[8]));
  rca_addsub #(.W(DATA_W)) u_y3 (.a(s1_q[2]), .b(s1_q[3]), .sub(1'b0), .y(s2_d[3]), .cout(cout_unused[9]));
  rca_addsub #(.W(DATA_W)) u_y4 (.a(s1_q[7]), .b(s1_q[6]), .sub(1'b0), .y(s2_d[4]), .cout(cout_unused[10]));
  rca_addsub #(.W(DATA_W)) u_y6 (.a(s1_q[4]), .b(s1_q[5]), .sub(1'b0), .y(s2_d[6]), .cout(cout_unused[11]));

  assign s2_d[0] = s1_q[0];  // x0 + x7
  assign s2_d[2] = s1_q[2];  // x2 + x5
  assign s2_d[5] = s1_q[6];  // x2 - x5
  assign s2_d[7] = s1_q[4];  // x0 - x7

  for (genvar i = 0; i < 8; i++) begin : g_reg2
    stage_reg #(.W(DATA_W)) u_reg (.clk(clk), .d(s2_d[i]), .q(y[i]));
  end

  // ---- valid pipeline ----------------------------------------------------
  logic [1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[0], in_valid};
  end

  assign out_valid = vld[1];

endmodule
