// Test of the four-tap weight-increment block. Each round sets random
// samples, control word and sign, pulses load (with adapt_en mostly high)
// and then checks (1) the weights against a bench copy updated with
// w += sign ? -(x >>> t) : (x >>> t), t = 7 meaning no change, modulo 256,
// and (2) that the following 8 cycles stream the new weights LSB first on
// a_slice.
module tb_weight_increment4;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic load, adapt_en, sign;
  logic signed [L-1:0] x [4];
  logic [2:0] t;
  logic [3:0] a_slice;
  logic [L-1:0] w [4];
  int checks = 0, failures = 0;
  int wr [4];
  int inc;
  always #5 clk = ~clk;
  weight_increment4 #(.L(L)) dut (.clk, .rst_n, .load, .adapt_en, .x, .t, .sign, .a_slice, .w);
  initial begin
    load = 0; adapt_en = 0; sign = 0; t = '0;
    for (int k = 0; k < 4; k++) begin x[k] = '0; wr[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      for (int k = 0; k < 4; k++) x[k] = L'($urandom);
      t = 3'($urandom);
      sign = 1'($urandom);
      adapt_en = ($urandom_range(0, 7) != 0);
      load = 1;
      if (adapt_en) begin
        for (int k = 0; k < 4; k++) begin
          inc = (t == 7) ? 0 : (int'(x[k]) >>> t);
          wr[k] = (wr[k] + (sign ? -inc : inc)) & 255;
        end
      end
      @(negedge clk);
      load = 0;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(w[k]) != wr[k]) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d w%0d=%0d exp %0d", it, k, w[k], wr[k]);
        end
      end
      for (int l = 0; l < L; l++) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (a_slice[k] !== 1'(wr[k] >> l)) begin
            failures++;
            if (failures < 10) $display("FAIL it %0d slice %0d", it, l);
          end
        end
        if (l < L - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
