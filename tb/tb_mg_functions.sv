// Exhaustive check of the four macro-gate functions over all 64 input
// values against an independently written reference, plus the number of
// minterms of each gate worked out by hand:
// g1 has 1, g2 (a 4:1 mux) has 32, g3 has 12, g4 has 56.
module tb_mg_functions;
  import tb_ref_pkg::*;

  logic [5:0] x;
  logic [3:0] g;
  int checks = 0, failures = 0;
  int ones [4];

  mg_functions dut (.x(x), .g(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ones = '{default: 0};
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      checks++;
      if (g !== ref_gates(x)) begin
        failures++;
        $display("mismatch x=%b g=%b ref=%b", x, g, ref_gates(x));
      end
      for (int k = 0; k < 4; k++) ones[k] += int'(g[k]);
    end
    checks++;
    if (ones[0] != 1 || ones[1] != 32 || ones[2] != 12 || ones[3] != 56) begin
      failures++;
      $display("minterm counts %0d %0d %0d %0d", ones[0], ones[1], ones[2], ones[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
