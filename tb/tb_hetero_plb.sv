// End-to-end test of the heterogeneous PLB at its default size (LUT-6,
// 6-input macro-gate, 10 inputs, 123 configuration bits).
//
// Each round loads a configuration word through the serial chain, then
// drives random PLB inputs for a number of clocks and compares both
// outputs every clock against a cycle model built from the reference
// macro-gate and a plain truth-table lookup. The rounds cover directed
// cases (AND3 from g1 with tied pins, XOR from g2, a LUT toggle using the
// registered feedback, daisy-chain output) and random configurations.
// Every mechanism of the block is counted and must occur at least once:
// configuration loads, each gate g1..g4, input and output inversion,
// registered and bypassed outputs, feedback from each element, the
// constant source and the configuration pass-through on cfg_out.
module tb_hetero_plb;
  import plb_pkg::*;
  import tb_ref_pkg::*;

  localparam int ROUNDS = 300;
  localparam int CYCLES = 40;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0, cfg_out;
  logic [PLB_INPUTS-1:0] plb_in = '0;
  logic [NUM_ELEMS-1:0]  plb_out;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_cfg_load, n_gate [4], n_in_inv, n_out_inv, n_reg, n_bypass;
  int n_fb_lut, n_fb_mg, n_const, n_daisy;

  hetero_plb dut (.clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .plb_in, .plb_out);

  always #5 clk = ~clk;

  initial begin
    repeat (ROUNDS * (PLB_CFG_W + CYCLES + 10) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state: registered element outputs
  logic m_lut_q, m_mg_q;
  plb_cfg_t cur;

  // Loads word w MSB first; checks the previous word leaves on cfg_out.
  task automatic load(input plb_cfg_t w);
    logic [PLB_CFG_W-1:0] old, nw;
    old = PLB_CFG_W'(cur);
    nw  = PLB_CFG_W'(w);
    for (int i = PLB_CFG_W - 1; i >= 0; i--) begin
      @(negedge clk);
      check(cfg_out == old[i], "cfg_out passes old word");
      cfg_en = 1'b1;
      cfg_in = nw[i];
    end
    @(negedge clk) cfg_en = 1'b0;
    n_daisy++;
    cur = w;
    n_cfg_load++;
  endtask

  function automatic logic [NUM_SOURCES-1:0] sources(input logic [PLB_INPUTS-1:0] pin);
    logic [NUM_SOURCES-1:0] s;
    s = '0;
    s[PLB_INPUTS-1:0] = pin;
    s[SRC_FB_LUT] = m_lut_q;
    s[SRC_FB_MG]  = m_mg_q;
    return s;
  endfunction

  // Runs n clocks of random inputs and checks both outputs each clock.
  task automatic run(input int n);
    logic [NUM_SOURCES-1:0] s;
    logic [LUT_K-1:0] lp;
    logic [MG_N-1:0]  mp;
    logic ly, my;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      if (t == 0) begin
        // take over the register state left by loading / directed checks
        m_lut_q = dut.u_lut_out.q_reg;
        m_mg_q  = dut.u_mg_out.q_reg;
      end
      plb_in = PLB_INPUTS'($urandom);
      #1;
      s = sources(plb_in);
      for (int i = 0; i < LUT_K; i++) lp[i] = (32'(cur.lut_sel[i]) < NUM_SOURCES) ? s[cur.lut_sel[i]] : 1'b0;
      for (int i = 0; i < MG_N; i++)  mp[i] = (32'(cur.mg_sel[i])  < NUM_SOURCES) ? s[cur.mg_sel[i]]  : 1'b0;
      ly = cur.lut_mask[lp];
      my = ref_macro_gate(9'(cur.mg), mp);
      check(plb_out[0] == (cur.lut_reg ? m_lut_q : ly), "LUT output");
      check(plb_out[1] == (cur.mg_reg  ? m_mg_q  : my), "macro-gate output");
      @(posedge clk);
      m_lut_q = ly;
      m_mg_q  = my;
    end
    // mechanism accounting for this configuration
    n_gate[cur.mg.gate_sel]++;
    if (cur.mg.in_inv != '0) n_in_inv++;
    if (cur.mg.out_inv) n_out_inv++;
    if (cur.lut_reg || cur.mg_reg) n_reg++;
    if (!cur.lut_reg || !cur.mg_reg) n_bypass++;
    for (int i = 0; i < LUT_K; i++) begin
      if (cur.lut_sel[i] == SEL_W'(SRC_FB_LUT) || cur.mg_sel[i] == SEL_W'(SRC_FB_LUT)) n_fb_lut++;
      if (cur.lut_sel[i] == SEL_W'(SRC_FB_MG)  || cur.mg_sel[i] == SEL_W'(SRC_FB_MG))  n_fb_mg++;
      if (cur.mg_sel[i] == SEL_W'(SRC_ZERO)) n_const++;
    end
  endtask

  function automatic plb_cfg_t rand_cfg();
    plb_cfg_t c;
    c.lut_mask = {$urandom, $urandom};
    for (int i = 0; i < LUT_K; i++) c.lut_sel[i] = SEL_W'($urandom_range(NUM_SOURCES - 1));
    for (int i = 0; i < MG_N; i++)  c.mg_sel[i]  = SEL_W'($urandom_range(NUM_SOURCES - 1));
    c.lut_reg     = 1'($urandom);
    c.mg_reg      = 1'($urandom);
    c.mg.in_inv   = 6'($urandom);
    c.mg.gate_sel = gate_sel_e'(2'($urandom));
    c.mg.out_inv  = 1'($urandom);
    return c;
  endfunction

  initial begin
    plb_cfg_t c;
    logic prev;
    cur = '0;
    m_lut_q = 1'b0;
    m_mg_q  = 1'b0;
    n_cfg_load = 0; n_gate = '{default: 0}; n_in_inv = 0; n_out_inv = 0;
    n_reg = 0; n_bypass = 0; n_fb_lut = 0; n_fb_mg = 0; n_const = 0; n_daisy = 0;
    repeat (3) @(posedge clk);
    check(plb_out == '0, "outputs low after reset");
    @(negedge clk) rst_n = 1'b1;

    // 1. AND3 of plb_in[2:0] from g1: pins d,e,f take the constant 0,
    //    inverted to 1; combinational output.
    c = '0;
    for (int i = 0; i < MG_N; i++) c.mg_sel[i] = SEL_W'(i < 3 ? i : SRC_ZERO);
    c.mg = '{out_inv: 1'b0, gate_sel: GATE_G1, in_inv: 6'b111000};
    load(c);
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      plb_in = PLB_INPUTS'(v);
      #1;
      check(plb_out[1] == (v == 7), "AND3 from g1");
    end
    run(CYCLES);

    // 2. XOR of plb_in[4] and plb_in[9] from g2 (select pins b,c),
    //    registered; the LUT computes NAND of the same two pins.
    c = '0;
    c.mg_sel = '{default: SEL_W'(SRC_ZERO)};
    c.mg_sel[1] = SEL_W'(4);
    c.mg_sel[2] = SEL_W'(9);
    c.mg = '{out_inv: 1'b0, gate_sel: GATE_G2, in_inv: 6'b011000};
    c.mg_reg = 1'b1;
    c.lut_sel = '{default: SEL_W'(SRC_ZERO)};
    c.lut_sel[0] = SEL_W'(4);
    c.lut_sel[1] = SEL_W'(9);
    c.lut_mask = 64'h7;           // out = ~(in0 & in1) with in5..in2 = 0
    load(c);
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      plb_in = PLB_INPUTS'($urandom);
      prev = plb_in[4] ^ plb_in[9];
      #1;
      check(plb_out[0] == !(plb_in[4] & plb_in[9]), "LUT NAND2");
      @(negedge clk);
      check(plb_out[1] == prev, "registered XOR from g2");
    end
    run(CYCLES);

    // 3. LUT as a toggle flip-flop through its own registered feedback.
    c = '0;
    c.lut_sel = '{default: SEL_W'(SRC_ZERO)};
    c.lut_sel[0] = SEL_W'(SRC_FB_LUT);
    c.lut_mask = 64'h1;           // out = ~in0
    c.lut_reg = 1'b1;
    c.mg_sel = '{default: SEL_W'(SRC_FB_LUT)};
    c.mg = '{out_inv: 1'b1, gate_sel: GATE_G1, in_inv: 6'b000000}; // NAND6 = ~q
    load(c);
    @(negedge clk) prev = plb_out[0];
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      check(plb_out[0] == !prev, "LUT toggles each clock");
      check(plb_out[1] == prev, "macro-gate inverts the fed-back LUT bit");
      prev = plb_out[0];
    end
    run(CYCLES);

    // 4. random configurations
    for (int r = 0; r < ROUNDS; r++) begin
      c = rand_cfg();
      load(c);
      run(CYCLES);
    end

    // every mechanism must have been exercised
    $display("loads=%0d g1..g4=%0d/%0d/%0d/%0d in_inv=%0d out_inv=%0d reg=%0d bypass=%0d fb_lut=%0d fb_mg=%0d const=%0d daisy=%0d",
             n_cfg_load, n_gate[0], n_gate[1], n_gate[2], n_gate[3], n_in_inv, n_out_inv,
             n_reg, n_bypass, n_fb_lut, n_fb_mg, n_const, n_daisy);
    check(n_cfg_load > 0, "configuration loads");
    for (int k = 0; k < 4; k++) check(n_gate[k] > 0, "each gate selected");
    check(n_in_inv > 0, "input inversion used");
    check(n_out_inv > 0, "output inversion used");
    check(n_reg > 0, "registered output used");
    check(n_bypass > 0, "bypassed output used");
    check(n_fb_lut > 0, "LUT feedback used");
    check(n_fb_mg > 0, "macro-gate feedback used");
    check(n_const > 0, "constant source used");
    check(n_daisy > 0, "configuration pass-through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
