// Test of the bit-cycle controller: after reset the counter runs 0..L-1 and
// `last` is high exactly in cycle L-1, so it pulses once every L clocks.
module tb_bit_controller;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] cnt;
  logic last;
  int checks = 0, failures = 0;
  int cyc, prev_last;
  bit_controller #(.L(L)) dut (.clk, .rst_n, .last);
  assign cnt = dut.cnt;
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_last = -1;
    for (cyc = 0; cyc < 100; cyc++) begin
      checks += 2;
      if (int'(cnt) != cyc % L) begin
        failures++;
        $display("FAIL cycle %0d cnt=%0d", cyc, cnt);
      end
      if (last !== (cyc % L == L - 1)) begin
        failures++;
        $display("FAIL cycle %0d last=%0d", cyc, last);
      end
      if (last) begin
        checks++;
        if (prev_last >= 0 && cyc - prev_last != L) failures++;
        prev_last = cyc;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
