// Checks the programmable inverter for all four combinations of the
// configuration bit and the data input.
module tb_prog_inverter;
  logic inv, d, q;
  int checks = 0, failures = 0;

  prog_inverter dut (.inv(inv), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {inv, d} = 2'(v);
      #1;
      checks++;
      if (q !== (inv ? !d : d)) begin
        failures++;
        $display("inv=%b d=%b q=%b", inv, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
