// A small mapped circuit run on four PLBs.
//
// The circuit has the shape of the seven-node example used to explain
// LUT/macro-gate balancing: after remapping, nodes n1, n2 and n4 are LUT-6s
// and n3, n5, n6 and n7 are macro-gates, packed two per PLB:
//   PLB0 = {LUT n1, MG n5}, PLB1 = {LUT n4, MG n6},
//   PLB2 = {LUT n2, MG n3}, PLB3 = {unused LUT, MG n7}.
// Edges: PI->n1, PI->n4, n1->n2, n1->n3, n4->n3, n4->n5, n3->n6, n5->n6,
// n2->n7, n6->n7. Besides these edges the nodes also read primary inputs;
// the node functions are made up for the test (only the shape is fixed). The four PLBs are daisy-chained on one
// configuration line and loaded with one 492-bit stream; plain wires stand
// in for the routing fabric. All 256 values of the 8 primary inputs are
// applied and the output n7 is compared with a model of the same netlist.
// Every node is checked, not only n7.
//
// Lint reports circular logic (UNOPTFLAT) here: PLB0 reads n4 from
// PLB1 while PLB1 reads n5 from PLB0. No node depends on itself; the loop
// exists only between whole PLB pin vectors, and the simulation settles.
module tb_area_recovery_example;
  import plb_pkg::*;
  import tb_ref_pkg::*;

  localparam int NPLB = 4;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0;
  logic [NPLB:0] chain;
  logic [PLB_INPUTS-1:0] pin [NPLB];
  logic [NUM_ELEMS-1:0]  pout [NPLB];
  logic [7:0] p;
  int checks = 0, failures = 0, ones = 0;

  assign chain[0] = cfg_in;
  for (genvar k = 0; k < NPLB; k++) begin : g_plb
    hetero_plb u_plb (
      .clk, .rst_n, .cfg_en, .cfg_in(chain[k]), .cfg_out(chain[k+1]),
      .plb_in(pin[k]), .plb_out(pout[k])
    );
  end

  // node outputs as seen on the PLB pins
  logic n1, n2, n3, n4, n5, n6, n7;
  assign n1 = pout[0][0];
  assign n5 = pout[0][1];
  assign n4 = pout[1][0];
  assign n6 = pout[1][1];
  assign n2 = pout[2][0];
  assign n3 = pout[2][1];
  assign n7 = pout[3][1];

  // routing: PLB input pins 0..7 carry the primary inputs, 8..9 the nodes
  assign pin[0] = {1'b0, n4, p};       // n1 (LUT), n5 (MG)
  assign pin[1] = {n5, n3, p};         // n4 (LUT), n6 (MG)
  assign pin[2] = {n4, n1, p};         // n2 (LUT), n3 (MG)
  assign pin[3] = {n6, n2, p};         // n7 (MG)

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [SEL_W-1:0] s(input int unsigned i);
    return SEL_W'(i);
  endfunction

  // node configurations
  plb_cfg_t cfg [NPLB];
  logic [63:0] f1, f2, f4;

  initial begin
    logic [NPLB*PLB_CFG_W-1:0] stream;
    logic e1, e2, e3, e4, e5, e6, e7;
    f1 = {$urandom, $urandom};
    f2 = {$urandom, $urandom};
    f4 = {$urandom, $urandom};
    cfg = '{default: '0};
    // Pin lists below are written f..a (pin 5 first), as '{} fills a
    // packed array from its top element.
    // PLB0: n1 = f1(p5..p0); n5 = g2 with a = n4 (pin 8)
    cfg[0].lut_mask = f1;
    for (int i = 0; i < 6; i++) cfg[0].lut_sel[i] = s(i);
    cfg[0].mg_sel = '{s(0), s(6), s(7), s(1), s(2), s(8)};
    cfg[0].mg = '{out_inv: 1'b0, gate_sel: GATE_G2, in_inv: 6'b000010};
    // PLB1: n4 = f4(p7..p2); n6 = inverted g4 with f = n3, e = n5
    cfg[1].lut_mask = f4;
    for (int i = 0; i < 6; i++) cfg[1].lut_sel[i] = s(i + 2);
    cfg[1].mg_sel = '{s(8), s(9), s(0), s(1), s(2), s(3)};
    cfg[1].mg = '{out_inv: 1'b1, gate_sel: GATE_G4, in_inv: 6'b000101};
    // PLB2: n2 = f2 with top input n1; n3 = g3 with f = n1, e = n4
    cfg[2].lut_mask = f2;
    cfg[2].lut_sel = '{s(8), s(0), s(1), s(2), s(3), s(4)};
    cfg[2].mg_sel = '{s(8), s(9), s(0), s(1), s(2), s(3)};
    cfg[2].mg = '{out_inv: 1'b0, gate_sel: GATE_G3, in_inv: 6'b010010};
    // PLB3: n7 = g1 = n2 & ~n6 & p5 & ~p6, pins a,b tied to 1
    cfg[3].lut_sel = '{default: s(SRC_ZERO)};
    cfg[3].mg_sel = '{s(8), s(9), s(5), s(6), s(SRC_ZERO), s(SRC_ZERO)};
    cfg[3].mg = '{out_inv: 1'b0, gate_sel: GATE_G1, in_inv: 6'b010111};

    // last PLB's word first: the first bit sent ends up at the far end
    stream = {cfg[3], cfg[2], cfg[1], cfg[0]};
    p = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = NPLB * PLB_CFG_W - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1'b1;
      cfg_in = stream[i];
    end
    @(negedge clk) cfg_en = 1'b0;
    for (int k = 0; k < NPLB; k++) begin
      checks++;
      if (g_plb_cfg(k) != cfg[k]) begin
        failures++;
        $display("PLB%0d configuration word wrong", k);
      end
    end

    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      p = 8'(v);
      #1;
      e1 = f1[p[5:0]];
      e4 = f4[p[7:2]];
      e2 = f2[{e1, p[0], p[1], p[2], p[3], p[4]}];
      e3 = ref_macro_gate({1'b0, 2'd2, 6'b010010}, {e1, e4, p[0], p[1], p[2], p[3]});
      e5 = ref_macro_gate({1'b0, 2'd1, 6'b000010}, {p[0], p[6], p[7], p[1], p[2], e4});
      e6 = ref_macro_gate({1'b1, 2'd3, 6'b000101}, {e3, e5, p[0], p[1], p[2], p[3]});
      e7 = ref_macro_gate({1'b0, 2'd0, 6'b010111}, {e2, e6, p[5], p[6], 2'b00});
      checks++;
      if ({n1, n2, n3, n4, n5, n6, n7} != {e1, e2, e3, e4, e5, e6, e7}) begin
        failures++;
        $display("p=%h nodes=%b exp=%b", p, {n1, n2, n3, n4, n5, n6, n7},
                 {e1, e2, e3, e4, e5, e6, e7});
      end
      ones += int'(n7);
    end
    $display("n7 was 1 for %0d of 256 input values", ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic plb_cfg_t g_plb_cfg(input int k);
    case (k)
      0: return plb_cfg_t'(g_plb[0].u_plb.cfg_bits);
      1: return plb_cfg_t'(g_plb[1].u_plb.cfg_bits);
      2: return plb_cfg_t'(g_plb[2].u_plb.cfg_bits);
      default: return plb_cfg_t'(g_plb[3].u_plb.cfg_bits);
    endcase
  endfunction
endmodule
