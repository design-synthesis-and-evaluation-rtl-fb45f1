// Configuration memory of one PLB, loaded as a serial shift chain.
//
// Each configuration bit of the block (LUT truth table, pin selects,
// macro-gate bits L0..L8, register enables) is one storage cell; in silicon
// these are 1-bit SRAM cells, here they are modelled as flip-flops. While
// cfg_en is high, one bit per clock enters the
// chain at bit 0 and every stored bit moves one place toward the MSB;
// cfg_out is the top bit, so several PLBs can be daisy-chained.
// After W clocks the first bit sent sits in bit W-1. With cfg_en low the
// contents hold. Reset clears every bit. The serial loading scheme is this
// design's choice; the architecture only states that the bits are SRAM.
module config_chain #(
  parameter int unsigned W = plb_pkg::PLB_CFG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_en,
  input  logic         cfg_in,
  output logic         cfg_out,
  output logic [W-1:0] bits
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      bits <= '0;
    else if (cfg_en) bits <= {bits[W-2:0], cfg_in};
  end

  assign cfg_out = bits[W-1];
endmodule
