// Exhaustive test of the sign-magnitude separator for 8-bit mu*e: sign is
// the MSB, magnitude is |mu_e| with -128 clamped to 127.
module tb_sign_mag_separator;
  localparam int L = 8;
  logic signed [L-1:0] mu_e;
  logic sign;
  logic [L-2:0] mag;
  int checks = 0, failures = 0;
  int em;
  sign_mag_separator #(.L(L)) dut (.mu_e, .sign, .mag);
  initial begin
    for (int v = -128; v < 128; v++) begin
      mu_e = L'(v);
      #1;
      em = (v < 0) ? -v : v;
      if (em > 127) em = 127;
      checks++;
      if (sign !== (v < 0) || int'(mag) != em) begin
        failures++;
        $display("FAIL v=%0d sign=%0d mag=%0d", v, sign, mag);
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
