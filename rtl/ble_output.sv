// Output stage of one logic element: a D flip-flop and a 2:1 bypass mux.
//
// With use_reg=1 the element output is registered (one clock of latency),
// otherwise it passes straight through. The registered value is always
// available on q_reg, which feeds the PLB's local feedback. A flip-flop
// behind each logic element follows the usual cluster of the island-style
// architecture the design assumes; the synchronous enable-free register and
// the asynchronous active-low reset are this design's own choice.
module ble_output (
  input  logic clk,
  input  logic rst_n,
  input  logic use_reg,
  input  logic d,
  output logic q,
  output logic q_reg
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_reg <= 1'b0;
    else        q_reg <= d;
  end

  assign q = use_reg ? q_reg : d;
endmodule
