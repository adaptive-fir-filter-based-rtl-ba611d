// Test of the carry-save shift accumulator (W = 10).
// Each cycle it checks the exact carry-save identity
//   s_nxt + 2*c_nxt = (s >>> 1) + c + (sign_ctl ? ~y : y)
// with all words read as signed, and after each run of 8 operands y_0..y_7
// (the last one sign-controlled, i.e. subtracted) it checks that
// (s>>>1) + c + 1 is within 2 of (sum_{j<7} y_j 2^j - y_7 2^7) / 2^8,
// the exact shift-accumulated value halved. It also checks that clear
// empties both words.
module tb_csa_accumulator;
  localparam int W = 10, L = 8;
  logic clk = 0, rst_n = 0;
  logic clear, sign_ctl;
  logic signed [W-1:0] y_in, s_nxt, c_nxt, s, c;
  int checks = 0, failures = 0;
  longint lhs, rhs, exact, got;
  int yv;
  real ideal;
  csa_accumulator #(.W(W)) dut (.clk, .rst_n, .clear, .sign_ctl, .y_in, .s_nxt, .c_nxt);
  assign s = dut.s;
  assign c = dut.c;
  always #5 clk = ~clk;
  initial begin
    clear = 0; sign_ctl = 0; y_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int run = 0; run < 300; run++) begin
      exact = 0;
      for (int j = 0; j < L; j++) begin
        yv = int'($urandom_range(0, 1020)) - 510;
        if (run == 0) yv = 510;
        if (run == 1) yv = -510;
        y_in = W'(yv);
        sign_ctl = (j == L - 1);
        clear = (j == L - 1);
        #1;
        lhs = longint'(s_nxt) + 2 * longint'(c_nxt);
        rhs = (longint'(s) >>> 1) + longint'(c) + (sign_ctl ? -longint'(yv) - 1 : longint'(yv));
        checks++;
        if (lhs != rhs) begin
          failures++;
          if (failures < 10) $display("FAIL identity run %0d j %0d: %0d vs %0d", run, j, lhs, rhs);
        end
        exact += (j == L - 1) ? -longint'(yv) * (1 << j) : longint'(yv) * (1 << j);
        if (j == L - 1) begin
          got = (longint'(s_nxt) >>> 1) + longint'(c_nxt) + 1;
          ideal = real'(exact) / 256.0;
          checks++;
          if (real'(got) - ideal > 2.0 || ideal - real'(got) > 2.0) begin
            failures++;
            if (failures < 10) $display("FAIL result run %0d got %0d ideal %f", run, got, ideal);
          end
        end
        @(negedge clk);
        if (j == L - 1) begin
          checks++;
          if (s != 0 || c != 0) begin
            failures++;
            $display("FAIL clear");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
