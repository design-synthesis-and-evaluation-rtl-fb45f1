// Shared constants and configuration types for the heterogeneous PLB
// (one K-input LUT plus one 6-input macro-gate per logic block).
//
// The sizes are the main configuration the design targets: a 6-input LUT,
// a 6-input macro-gate and 10 PLB input pins. The layout of the
// configuration word (field order, select encoding) is this design's own
// choice; only the bit counts of the macro-gate (6 input-inversion bits,
// 2 gate-select bits, 1 output-inversion bit) follow the architecture.
package plb_pkg;

  localparam int unsigned LUT_K      = 6;   // LUT inputs
  localparam int unsigned MG_N       = 6;   // macro-gate inputs
  localparam int unsigned PLB_INPUTS = 10;  // PLB input pins
  localparam int unsigned NUM_ELEMS  = 2;   // one LUT + one macro-gate

  // Sources offered to every element pin: the PLB inputs, the registered
  // outputs of the two elements, and a constant 0 (used with the pin's
  // inverter to tie a macro-gate input to 0 or 1).
  localparam int unsigned NUM_SOURCES = PLB_INPUTS + NUM_ELEMS + 1;
  localparam int unsigned SEL_W       = $clog2(NUM_SOURCES);
  localparam int unsigned SRC_FB_LUT  = PLB_INPUTS;
  localparam int unsigned SRC_FB_MG   = PLB_INPUTS + 1;
  localparam int unsigned SRC_ZERO    = PLB_INPUTS + 2;

  // Gate-select code of the macro-gate's 4:1 mux ({L7,L6}).
  typedef enum logic [1:0] {
    GATE_G1 = 2'd0,
    GATE_G2 = 2'd1,
    GATE_G3 = 2'd2,
    GATE_G4 = 2'd3
  } gate_sel_e;

  // The nine programmable bits L0..L8 of one macro-gate.
  typedef struct packed {
    logic        out_inv;   // L8
    gate_sel_e   gate_sel;  // L7:L6
    logic [MG_N-1:0] in_inv; // L5..L0
  } mg_cfg_t;


  // Configuration word of the whole PLB, shifted in MSB first through the
  // configuration chain.
  typedef struct packed {
    logic                          mg_reg;   // register the macro-gate output
    logic [MG_N-1:0][SEL_W-1:0]    mg_sel;   // macro-gate pin sources
    mg_cfg_t                       mg;       // macro-gate bits L0..L8
    logic                          lut_reg;  // register the LUT output
    logic [LUT_K-1:0][SEL_W-1:0]   lut_sel;  // LUT pin sources
    logic [(1<<LUT_K)-1:0]         lut_mask; // LUT truth table
  } plb_cfg_t;

  localparam int unsigned PLB_CFG_W = $bits(plb_cfg_t);

endpackage
