// stage_reg: W-bit D register that holds the outputs of one adder stage for
// the next, giving each stage of the DCT a delay of one clock.
//
// The design places such a register bank ("D" boxes clocked by clk) behind
// every adder stage. It is written here as edge-triggered flip-flops rather
// than level-sensitive latches so that the pipeline has a clean one-cycle
// step; the data carry no reset, since a valid flag travelling beside them
// tells when they hold meaningful values.
//
// Interface: clk, d (W bits) in; q (W bits) out, q = d of the previous rising edge.
module stage_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) q <= d;

endmodule
