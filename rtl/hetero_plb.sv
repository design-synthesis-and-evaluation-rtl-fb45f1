// Heterogeneous programmable logic block: one 6-input LUT and one 6-input
// macro-gate side by side.
//
// The macro-gate implements, with nine configuration bits, the NPN classes
// of four fixed wide gates and (through constant inputs) all of their
// cofactors; the LUT implements anything of up to six inputs. Mapping logic
// so that LUTs and macro-gates are used in a 1:1 ratio packs a design into
// fewer, smaller blocks than LUT-6 pairs would need.
//
// Datapath: each of the 6 LUT pins and the 6 macro-gate pins has its own
// input selection mux over the 10 PLB inputs, the registered outputs of
// the two elements and a constant 0 (fully populated cluster). Each element
// drives a flip-flop with a bypass mux; plb_out[0] is the LUT output,
// plb_out[1] the macro-gate output.
//
// Configuration: all programmable bits (see plb_pkg::plb_cfg_t) sit in one
// serial chain. Hold cfg_en high for PLB_CFG_W clocks, sending the word MSB
// first on cfg_in; cfg_out passes the chain on to the next block.
//
// Timing: with an element's register bypassed its output is combinational
// from plb_in; with the register on, it changes one clock after the inputs.
// The LUT/macro-gate pairing, 6-input sizes and 10 block inputs follow the
// architecture; the configuration chain, the constant source, registered-only
// feedback and the flip-flops' reset are this design's own choices.
module hetero_plb
  import plb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_en,
  input  logic                  cfg_in,
  output logic                  cfg_out,
  input  logic [PLB_INPUTS-1:0] plb_in,
  output logic [NUM_ELEMS-1:0]  plb_out
);
  plb_cfg_t cfg;
  logic [PLB_CFG_W-1:0] cfg_bits;

  config_chain #(.W(PLB_CFG_W)) u_cfg (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .bits(cfg_bits)
  );
  assign cfg = plb_cfg_t'(cfg_bits);

  // Sources available to every element pin.
  logic [NUM_SOURCES-1:0] src;
  logic lut_q_reg, mg_q_reg;
  always_comb begin
    src                  = '0;
    src[PLB_INPUTS-1:0]  = plb_in;
    src[SRC_FB_LUT]      = lut_q_reg;
    src[SRC_FB_MG]       = mg_q_reg;
    src[SRC_ZERO]        = 1'b0;
  end

  // LUT with its pin muxes and output stage.
  logic [LUT_K-1:0] lut_pin;
  logic             lut_y;
  for (genvar i = 0; i < LUT_K; i++) begin : g_lut_pin
    input_select_mux u_sel (.src(src), .sel(cfg.lut_sel[i]), .out(lut_pin[i]));
  end
  lut #(.K(LUT_K)) u_lut (.mask(cfg.lut_mask), .in(lut_pin), .out(lut_y));
  ble_output u_lut_out (
    .clk, .rst_n, .use_reg(cfg.lut_reg), .d(lut_y),
    .q(plb_out[0]), .q_reg(lut_q_reg)
  );

  // Macro-gate with its pin muxes and output stage.
  logic [MG_N-1:0] mg_pin;
  logic            mg_y;
  for (genvar i = 0; i < MG_N; i++) begin : g_mg_pin
    input_select_mux u_sel (.src(src), .sel(cfg.mg_sel[i]), .out(mg_pin[i]));
  end
  macro_gate u_mg (.cfg(cfg.mg), .in(mg_pin), .out(mg_y));
  ble_output u_mg_out (
    .clk, .rst_n, .use_reg(cfg.mg_reg), .d(mg_y),
    .q(plb_out[1]), .q_reg(mg_q_reg)
  );

  // Once configured (cfg_en low), every pin select must name a source.
  for (genvar i = 0; i < LUT_K; i++) begin : g_chk_lut
    always_ff @(posedge clk) begin
      if (!cfg_en)
        assert (32'(cfg.lut_sel[i]) < NUM_SOURCES)
          else $warning("hetero_plb: LUT pin %0d has unused select code", i);
    end
  end
  for (genvar i = 0; i < MG_N; i++) begin : g_chk_mg
    always_ff @(posedge clk) begin
      if (!cfg_en)
        assert (32'(cfg.mg_sel[i]) < NUM_SOURCES)
          else $warning("hetero_plb: macro-gate pin %0d has unused select code", i);
    end
  end
endmodule
