// K-input lookup table built as a tree of 2:1 multiplexers.
//
// The 2^K configuration bits form the leaves; input 0 steers the first
// level of 2^(K-1) muxes, input K-1 the single mux at the root, so a LUT-6
// has 63 muxes and a LUT-4 has 15. The output equals mask[in] for every
// input value. K defaults to 6, the LUT size of the main architecture.
// Purely combinational.
module lut #(
  parameter int unsigned K = plb_pkg::LUT_K
) (
  input  logic [(1<<K)-1:0] mask,
  input  logic [K-1:0]      in,
  output logic              out
);
  // Level l holds 2^(K-l) nodes; level 0 is the configuration bits.
  logic [(1<<K)-1:0] lvl [K+1];

  assign lvl[0] = mask;

  for (genvar l = 0; l < K; l++) begin : g_level
    for (genvar n = 0; n < (1 << (K - l - 1)); n++) begin : g_mux
      assign lvl[l+1][n] = in[l] ? lvl[l][2*n+1] : lvl[l][2*n];
    end
    // upper entries of the narrower levels are unused
    assign lvl[l+1][(1<<K)-1:(1<<(K-l-1))] = '0;
  end

  assign out = lvl[K][0];
endmodule
