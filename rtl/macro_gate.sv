// 6-input macro-gate with programmable input and output negation.
//
// Structure: six programmable inverters (bits L0..L5) drive the 6-bit bus
// that feeds the four fixed gates g1..g4; a 4:1 mux (select bits L7,L6)
// picks one gate output; a seventh programmable inverter (L8) drives the
// output. Nine configuration bits in all, against 64 for a 6-input LUT.
// Input pin i of the macro-gate is variable a..f in the gate equations
// (pin 0 = a). Gate-select code {L7,L6}: 0=g1, 1=g2, 2=g3, 3=g4 (this
// encoding is this design's choice). Purely combinational.
module macro_gate
  import plb_pkg::*;
(
  input  mg_cfg_t        cfg,
  input  logic [MG_N-1:0] in,
  output logic           out
);
  logic [MG_N-1:0] bus;
  logic [3:0]      g;
  logic            sel;

  for (genvar i = 0; i < MG_N; i++) begin : g_in_inv
    prog_inverter u_inv (.inv(cfg.in_inv[i]), .d(in[i]), .q(bus[i]));
  end

  mg_functions u_gates (.x(bus), .g(g));

  always_comb begin
    unique case (cfg.gate_sel)
      GATE_G1: sel = g[0];
      GATE_G2: sel = g[1];
      GATE_G3: sel = g[2];
      GATE_G4: sel = g[3];
      default: sel = g[0];
    endcase
  end

  prog_inverter u_out_inv (.inv(cfg.out_inv), .d(sel), .q(out));
endmodule
