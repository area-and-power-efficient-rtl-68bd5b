// rca_addsub: W-bit ripple carry adder/subtractor made of a chain of
// mgdi_fa8t full adder cells, the adder every addition of the DCT uses.
//
// Subtraction is two's complement addition: with sub = 1 the b operand is
// inverted bit by bit and the carry into bit 0 is set, so y = a - b.
// The result wraps modulo 2**W; cout is the carry out of the top cell.
// The 16-bit default width follows the design; the add/subtract control
// input is this implementation's way of offering both operations in one block.
//
// Interface: a, b (W bits), sub; y (W bits), cout. Purely combinational; the
// delay grows linearly with W through the carry chain.
module rca_addsub #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y,
  output logic         cout
);

  logic [W:0]   c;
  logic [W-1:0] b_eff;

  assign c[0]  = sub;
  assign b_eff = b ^ {W{sub}};

  for (genvar i = 0; i < W; i++) begin : g_bit
    mgdi_fa8t u_fa (
      .a   (a[i]),
      .b   (b_eff[i]),
      .cin (c[i]),
      .sum (y[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
