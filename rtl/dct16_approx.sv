// dct16_approx: 16-point approximate 1D DCT built from two 8-point ones.
//
// The input adder unit (dct16_input_adder) forms the sums x[i] + x[15-i]
// and the differences x[7-i] - x[8+i]. Each group of eight goes through its
// own 8-point approximate DCT (dct8_approx, 12 additions). The output
// permutation unit then interleaves the two results: the upper block gives
// the even coefficients and the lower block the odd ones,
//   f[2k] = upper[k],  f[2k + 1] = lower[k]   (k = 0..7).
// The whole needs 16 + 2 * 12 = 40 additions and no multiplier or shifter.
// The structure (input adder unit, two 8-point units, output permutation)
// follows the design; the permutation is fixed wiring.
//
// Interface: clk, rst_n (asynchronous, active low), in_valid, x[16] in;
// out_valid, f[16] out. One vector per clock, latency 3 clocks (one for the
// input adder unit, two for the 8-point units).
module dct16_approx
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t x [16],
  output logic  out_valid,
  output word_t f [16]
);

  word_t v [16];
  logic  v_valid;
  word_t v_hi [8];
  word_t v_lo [8];
  word_t y_hi [8];
  word_t y_lo [8];
  logic  hi_valid;
  logic  lo_valid;

  dct16_input_adder u_in (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(v_valid), .v(v)
  );

  for (genvar i = 0; i < 8; i++) begin : g_split
    assign v_hi[i] = v[i];
    assign v_lo[i] = v[8+i];
  end

  dct8_approx u_hi (
    .clk(clk), .rst_n(rst_n), .in_valid(v_valid), .x(v_hi),
    .out_valid(hi_valid), .y(y_hi)
  );

  dct8_approx u_lo (
    .clk(clk), .rst_n(rst_n), .in_valid(v_valid), .x(v_lo),
    .out_valid(lo_valid), .y(y_lo)
  );

  // output permutation unit
  for (genvar k = 0; k < 8; k++) begin : g_perm
    assign f[2*k]   = y_hi[k];
    assign f[2*k+1] = y_lo[k];
  end

  // both halves run from the same valid flag and so are always in step
  assign out_valid = hi_valid & lo_valid;

endmodule
