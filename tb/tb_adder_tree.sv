// Random test of the four-input adder tree with 10-bit signed inputs; the
// 12-bit result is compared with the integer sum.
module tb_adder_tree;
  localparam int NB = 4, W = 10;
  logic signed [W-1:0] in [NB];
  logic signed [W+1:0] sum;
  int checks = 0, failures = 0;
  int es;
  adder_tree #(.NB(NB), .W(W)) dut (.in, .sum);
  initial begin
    for (int it = 0; it < 2000; it++) begin
      es = 0;
      for (int j = 0; j < NB; j++) begin
        in[j] = W'($urandom);
        if (it == 0) in[j] = -512;
        if (it == 1) in[j] = 511;
        es += int'(in[j]);
      end
      #1;
      checks++;
      if (int'(sum) != es) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%0d exp=%0d", sum, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
