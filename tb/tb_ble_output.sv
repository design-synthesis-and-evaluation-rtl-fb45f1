// Checks the element output stage: in bypass mode q follows d at once, in
// registered mode q is d of the previous clock; q_reg always is.
module tb_ble_output;
  logic clk = 1'b0, rst_n = 1'b0, use_reg = 1'b0, d = 1'b0, q, q_reg;
  logic prev_d;
  int checks = 0, failures = 0;

  ble_output dut (.clk, .rst_n, .use_reg, .d, .q, .q_reg);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (q_reg !== 1'b0) failures++;
    rst_n = 1'b1;
    prev_d = 1'b0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      use_reg = 1'($urandom);
      d       = 1'($urandom);
      #1;
      checks++;
      if (q_reg !== prev_d) begin
        failures++;
        $display("q_reg=%b exp=%b", q_reg, prev_d);
      end
      checks++;
      if (q !== (use_reg ? prev_d : d)) begin
        failures++;
        $display("q=%b use_reg=%b", q, use_reg);
      end
      @(posedge clk);
      prev_d = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
