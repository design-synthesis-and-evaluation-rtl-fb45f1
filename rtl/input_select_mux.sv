// Input selection multiplexer in front of one pin of a LUT or macro-gate.
//
// The cluster is fully populated: every pin can take any PLB input pin, the
// registered output of either logic element of the PLB, or a constant 0.
// The SEL_W-bit select comes from the configuration memory; source numbers
// are 0..PLB_INPUTS-1 for the PLB pins, then the LUT feedback, the
// macro-gate feedback and the constant. Codes above the last source also
// give 0; the PLB asserts that none is configured. Full connectivity inside the
// cluster follows the architecture; the constant source and the choice of
// feeding back only registered outputs (so no combinational loop can be
// configured) are this design's own. Purely combinational.
module input_select_mux
  import plb_pkg::*;
#(
  parameter int unsigned N_SRC = NUM_SOURCES,
  parameter int unsigned SW    = SEL_W
) (
  input  logic [N_SRC-1:0] src,
  input  logic [SW-1:0]    sel,
  output logic             out
);
  always_comb begin
    out = 1'b0;
    for (int unsigned i = 0; i < N_SRC; i++) begin
      if (sel == SW'(i)) out = src[i];
    end
  end
endmodule
