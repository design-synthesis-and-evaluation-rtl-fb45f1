// Checks the LUT at its default size (6 inputs) and at 4 inputs: for
// random truth tables every input value must return the addressed bit.
module tb_lut;
  logic [63:0] mask6;
  logic [5:0]  in6;
  logic        out6;
  logic [15:0] mask4;
  logic [3:0]  in4;
  logic        out4;
  int checks = 0, failures = 0;

  lut dut6 (.mask(mask6), .in(in6), .out(out6));
  lut #(.K(4)) dut4 (.mask(mask4), .in(in4), .out(out4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      mask6 = {$urandom, $urandom};
      mask4 = 16'($urandom);
      if (t == 0) mask6 = 64'h1;                 // single minterm
      if (t == 1) mask6 = 64'h8000_0000_0000_0000;
      for (int v = 0; v < 64; v++) begin
        in6 = 6'(v);
        in4 = 4'(v);
        #1;
        checks++;
        if (out6 !== mask6[v]) begin
          failures++;
          $display("LUT6 mask=%h in=%0d out=%b", mask6, v, out6);
        end
        checks++;
        if (out4 !== mask4[v % 16]) begin
          failures++;
          $display("LUT4 mask=%h in=%0d out=%b", mask4, v % 16, out4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
