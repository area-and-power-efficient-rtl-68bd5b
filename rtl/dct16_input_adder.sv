// dct16_input_adder: input adder unit of the 16-point approximate DCT.
//
// It folds the 16 inputs into two 8-point problems with 16 adders:
//   v[i]     = x[i]     + x[15-i]   (i = 0..7, fed to the upper 8-point DCT)
//   v[8 + i] = x[7 - i] - x[8 + i]  (i = 0..7, fed to the lower 8-point DCT)
// which is the butterfly [I J; J -I] (J the 8x8 exchange matrix) used to
// build a 16-point transform from two 8-point ones. The results are held in a
// register bank, so v and out_valid follow x and in_valid by one clock.
//
// The sum/difference split between the two halves follows the design; the
// exact ordering and sign of the differences on the lower half, and the
// register behind the unit, are this implementation's choices.
//
// Interface: clk, rst_n (asynchronous, active low, clears out_valid),
// in_valid, x[16] in; out_valid, v[16] out. Latency 1 clock.
module dct16_input_adder
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x [16],
  output logic  out_valid,
  output word_t v [16]
);

  word_t v_d [16];
  logic [15:0] cout_unused;  // carry outs, results wrap at DATA_W bits

  for (genvar i = 0; i < 8; i++) begin : g_add
    rca_addsub #(.W(DATA_W)) u_sum (
      .a(x[i]), .b(x[15-i]), .sub(1'b0), .y(v_d[i]), .cout(cout_unused[i])
    );
    rca_addsub #(.W(DATA_W)) u_dif (
      .a(x[7-i]), .b(x[8+i]), .sub(1'b1), .y(v_d[8+i]), .cout(cout_unused[8+i])
    );
  end

  for (genvar i = 0; i < 16; i++) begin : g_reg
    stage_reg #(.W(DATA_W)) u_reg (.clk(clk), .d(v_d[i]), .q(v[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
