// mgdi_fa8t: one-bit full adder, the logic function of the 8-transistor
// Modified Gate Diffusion Input (MGDI) full adder cell.
//
// The cell itself is a transistor-level circuit (five pMOS, three nMOS, two
// of the nMOS sized weak); only its Boolean behaviour can be expressed in RTL,
// and that is what this module gives: sum = a xor b xor cin and
// cout = majority(a, b, cin). Transistor sizing, full-swing bulk connections
// and the cell's internal nodes are not modelled.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module mgdi_fa8t (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;  // propagate: a and b differ

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = p ? cin : a;
  end

endmodule
