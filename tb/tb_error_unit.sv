// Test of the error unit (L = 8, YW = 12): random sum/carry words and
// desired values. y must equal (s>>>1) + c + 1 at once; d is registered at
// a load edge and mu_e, registered at the next load edge, must equal
// floor((d - y) / 16) saturated to [-128, 127].
module tb_error_unit;
  localparam int L = 8, YW = 12;
  logic clk = 0, rst_n = 0;
  logic load;
  logic signed [YW-1:0] s, c, d, y;
  logic signed [L-1:0] mu_e;
  int checks = 0, failures = 0;
  int dv, yv, ev, sat_hits;
  always #5 clk = ~clk;
  error_unit #(.L(L), .YW(YW)) dut (.clk, .rst_n, .load, .s, .c, .d, .y, .mu_e);
  initial begin
    load = 0; s = '0; c = '0; d = '0;
    sat_hits = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      // load d
      dv = int'($urandom_range(0, 4095)) - 2048;
      if (it % 3 != 0) dv = int'($urandom_range(0, 1000)) - 500;
      d = YW'(dv);
      load = 1;
      @(negedge clk);
      load = 0;
      d = YW'($urandom);           // not loaded
      s = YW'($urandom_range(0, 1000) - 500);
      c = YW'($urandom_range(0, 1000) - 500);
      #1;
      yv = (int'(s) >>> 1) + int'(c) + 1;
      if (yv > 2047) yv -= 4096;
      if (yv < -2048) yv += 4096;
      checks++;
      if (int'(y) != yv) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d exp %0d", y, yv);
      end
      ev = (dv - yv) >>> 4;
      if (ev > 127) begin ev = 127; sat_hits++; end
      if (ev < -128) begin ev = -128; sat_hits++; end
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (int'(mu_e) != ev) begin
        failures++;
        if (failures < 10) $display("FAIL mu_e=%0d exp %0d (d=%0d y=%0d)", mu_e, ev, dv, yv);
      end
      repeat (2) @(negedge clk);
      checks++;
      if (int'(mu_e) != ev) failures++;   // held between loads
    end
    checks++;
    if (sat_hits == 0) failures++;
    $display("saturation cases: %0d", sat_hits);
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
