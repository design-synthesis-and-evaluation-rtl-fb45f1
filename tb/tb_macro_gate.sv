// Exhaustive check of the macro-gate: all 512 settings of L0..L8 times all
// 64 input values against the reference model. It then checks two uses
// worked out by hand: a 3-input AND taken from g1 by tying three pins to 1
// (input 0 with its inverter on), and XOR of two signals taken from g2 by
// driving its select pins with the signals and its data pins with 0,1,1,0.
module tb_macro_gate;
  import plb_pkg::*;
  import tb_ref_pkg::*;

  mg_cfg_t    cfg;
  logic [5:0] in;
  logic       out;
  int checks = 0, failures = 0;

  macro_gate dut (.cfg(cfg), .in(in), .out(out));

  task automatic expect_out(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("%s: cfg=%b in=%b out=%b exp=%b", what, cfg, in, out, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 512; c++) begin
      cfg = mg_cfg_t'(9'(c));
      for (int v = 0; v < 64; v++) begin
        in = 6'(v);
        #1;
        expect_out(ref_macro_gate(9'(c), in), "exhaustive");
      end
    end
    // AND3(p,q,r) on pins a,b,c; pins d,e,f driven 0 and inverted to 1.
    cfg = '{out_inv: 1'b0, gate_sel: GATE_G1, in_inv: 6'b111000};
    for (int v = 0; v < 8; v++) begin
      in = {3'b000, 3'(v)};
      #1;
      expect_out(v == 7, "and3");
    end
    // XOR(p,q): b=p, c=q, a=0, d=1 (0 inverted), e=1 (0 inverted), f=0.
    cfg = '{out_inv: 1'b0, gate_sel: GATE_G2, in_inv: 6'b011000};
    for (int v = 0; v < 4; v++) begin
      in = {3'b000, 2'(v), 1'b0};
      #1;
      expect_out(^(2'(v)), "xor2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
