// Programmable inverter: an inverter followed by a 2:1 mux whose select is
// one configuration bit. With inv=0 the signal passes unchanged, with inv=1
// it is complemented. The macro-gate has seven of these (six inputs and the
// output), which is what gives it NPN flexibility for input and output
// negation. The polarity of the configuration bit is this design's choice.
// Purely combinational.
module prog_inverter (
  input  logic inv,
  input  logic d,
  output logic q
);
  logic d_n;
  assign d_n = ~d;
  assign q   = inv ? d_n : d;
endmodule
