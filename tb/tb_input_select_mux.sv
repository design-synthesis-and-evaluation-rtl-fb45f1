// Checks the input selection mux: every used select code returns its
// source for random source vectors (13 sources: 10 PLB pins, 2 feedbacks,
// constant 0).
module tb_input_select_mux;
  import plb_pkg::*;

  logic [NUM_SOURCES-1:0] src;
  logic [SEL_W-1:0]       sel;
  logic                   out;
  int checks = 0, failures = 0;

  input_select_mux dut (.src(src), .sel(sel), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      src = NUM_SOURCES'($urandom);
      for (int s = 0; s < NUM_SOURCES; s++) begin
        sel = SEL_W'(s);
        #1;
        checks++;
        if (out !== src[s]) begin
          failures++;
          $display("src=%b sel=%0d out=%b", src, s, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
