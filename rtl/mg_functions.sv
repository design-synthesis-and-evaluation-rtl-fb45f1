// The four fixed logic functions of the macro-gate, g1..g4.
//
// These are the highest-ranked 6-input NPN classes of the function-ranking
// step; with input and output negation they cover about half of the
// functions a LUT-mapped design uses. Purely combinational, no timing.
// Inputs are named a..f as in the equations: x[0]=a, x[1]=b, ... x[5]=f.
//
//   g1 = a b c d e f                           (6-input AND)
//   g2 = a b' c' + b c f + b c' d + b' c e     (4:1 mux on b,c of a,d,e,f)
//   g3 = a b' c d' e + b c e f + d e f
//   g4 = a b' + a' c d' + b' c' + e' + f'
//
// The equations follow the architecture's definitions; where the printed
// equation of g3 was ambiguous, the product term "bcef" is taken from the
// cell-level netlist of the gates (an OAI21 whose inputs are NAND(e,f) and
// d'.NAND(b,c), giving ef(bc+d)). The gates are written as sum-of-products;
// the cell-level mapping is left to synthesis.
module mg_functions (
  input  logic [5:0] x,
  output logic [3:0] g
);
  logic a, b, c, d, e, f;
  assign {f, e, d, c, b, a} = x;

  always_comb begin
    g[0] = a & b & c & d & e & f;
    g[1] = (a & ~b & ~c) | (b & c & f) | (b & ~c & d) | (~b & c & e);
    g[2] = (a & ~b & c & ~d & e) | (b & c & e & f) | (d & e & f);
    g[3] = (a & ~b) | (~a & c & ~d) | (~b & ~c) | ~e | ~f;
  end
endmodule
