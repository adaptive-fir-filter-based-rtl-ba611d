// Exhaustive test of the control-word generator for a 7-bit magnitude:
// t = 6 - floor(log2(mag)) for a non-zero magnitude, 7 for zero, so that
// mag * 2^t lies in [64, 127].
module tb_control_word_gen;
  localparam int L = 8;
  logic [L-2:0] mag;
  logic [2:0] t;
  int checks = 0, failures = 0;
  int et;
  control_word_gen #(.L(L)) dut (.mag, .t);
  initial begin
    for (int v = 0; v < 128; v++) begin
      mag = 7'(v);
      #1;
      if (v == 0) et = 7;
      else begin
        et = 0;
        while ((v << et) < 64) et++;
      end
      checks++;
      if (int'(t) != et) begin
        failures++;
        $display("FAIL mag=%0d t=%0d exp=%0d", v, t, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
