// Reference models shared by the testbenches. They are written in a form
// different from the RTL (the mux view of g2, the factored form of g3, the
// complemented form of g4) so that a slip in one is caught by the other.
package tb_ref_pkg;

  // g1..g4 of the macro-gate, x[0]=a .. x[5]=f; returns {g4,g3,g2,g1}.
  function automatic logic [3:0] ref_gates(input logic [5:0] x);
    logic a, b, c, d, e, f;
    logic [3:0] g;
    {f, e, d, c, b, a} = x;
    g[0] = &x;
    // g2 is a 4:1 mux with select (c,b) over data (a, d, e, f)
    case ({c, b})
      2'b00:   g[1] = a;
      2'b01:   g[1] = d;
      2'b10:   g[1] = e;
      default: g[1] = f;
    endcase
    g[2] = (a & ~b & c & ~d & e) | (e & f & ((b & c) | d));
    g[3] = ~(e & f & ~(a & ~b) & ~(~a & c & ~d) & ~(~b & ~c));
    return g;
  endfunction

  // Whole macro-gate: cfg = {L8, L7:L6, L5..L0}.
  function automatic logic ref_macro_gate(input logic [8:0] cfg,
                                          input logic [5:0] in);
    logic [3:0] g;
    g = ref_gates(in ^ cfg[5:0]);
    return g[cfg[7:6]] ^ cfg[8];
  endfunction

endpackage
