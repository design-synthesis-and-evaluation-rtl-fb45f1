// Checks the configuration chain at the PLB's width: reset clears it, a
// word sent MSB first lands in place after exactly W enabled clocks, the
// contents hold while cfg_en is low, and the old word leaves on cfg_out
// MSB first while a new one is shifted in (daisy chaining).
module tb_config_chain;
  import plb_pkg::*;
  localparam int unsigned W = PLB_CFG_W;

  logic clk = 1'b0, rst_n = 1'b0, cfg_en = 1'b0, cfg_in = 1'b0, cfg_out;
  logic [W-1:0] bits, word_a, word_b;
  int checks = 0, failures = 0;

  config_chain #(.W(W)) dut (.clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .bits);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int i = 0; i < W; i += 32) w = {w, $urandom};
    return w;
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    word_a = rand_word();
    word_b = rand_word();
    repeat (2) @(posedge clk);
    check(bits == '0, "reset clears");
    @(negedge clk) rst_n = 1'b1;
    // shift word_a in, MSB first
    for (int i = W - 1; i >= 0; i--) begin
      @(negedge clk);
      cfg_en = 1'b1;
      cfg_in = word_a[i];
    end
    @(negedge clk) cfg_en = 1'b0;
    check(bits == word_a, "word A loaded");
    repeat (7) @(negedge clk) cfg_in = ~cfg_in;
    check(bits == word_a, "hold while disabled");
    // shift word_b in; word_a must come out MSB first
    for (int i = W - 1; i >= 0; i--) begin
      @(negedge clk);
      check(cfg_out == word_a[i], "daisy-chain output");
      cfg_en = 1'b1;
      cfg_in = word_b[i];
    end
    @(negedge clk) cfg_en = 1'b0;
    check(bits == word_b, "word B loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
