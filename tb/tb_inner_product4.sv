// Test of the four-point DA inner-product block.
// The bench drives the 8-cycle sample period itself: a new random sample in
// the last cycle of every period, and random 8-bit weights streamed as bit
// slices, LSB first. One period after the slices of a weight set were fed,
// (s_out>>>1) + c_out + 1 must be within 2 of sum_k w_k x(n-k) / 256
// (weights as integers), and the result must appear exactly one period
// late (latency check through the schedule). The four taps must equal the
// last four samples.
module tb_inner_product4;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic last;
  logic signed [L-1:0] x_new;
  logic [3:0] a_slice;
  logic signed [L-1:0] taps [4];
  logic signed [L+1:0] s_out, c_out;
  int checks = 0, failures = 0;
  int hist [4];
  int w [4];
  longint p_prev;
  bit have_prev;
  real got, ideal;

  inner_product4 #(.L(L)) dut (.clk, .rst_n, .last, .x_new, .a_slice, .taps, .s_out, .c_out);
  always #5 clk = ~clk;

  initial begin
    last = 0; x_new = '0; a_slice = '0;
    hist = '{0, 0, 0, 0};
    have_prev = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // first load with no weights: period structure starts at cycle L-1
    for (int per = 0; per < 400; per++) begin
      for (int k = 0; k < 4; k++) begin
        w[k] = int'($urandom_range(0, 255)) - 128;
        if (per == 5) w[k] = -128;
        if (per == 6) w[k] = 127;
      end
      for (int l = 0; l < L; l++) begin
        for (int k = 0; k < 4; k++) a_slice[k] = w[k][l];
        last = (l == L - 1);
        if (l == 0 && have_prev) begin
          // result of the previous period is held during this one
          got = real'((longint'(s_out) >>> 1) + longint'(c_out) + 1);
          ideal = real'(p_prev) / 256.0;
          checks++;
          if (got - ideal > 2.0 || ideal - got > 2.0) begin
            failures++;
            if (failures < 10) $display("FAIL per %0d got %f ideal %f", per, got, ideal);
          end
        end
        if (l == L - 1) begin
          // taps hold the samples of this period
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (int'(taps[j]) != hist[j]) begin
              failures++;
              if (failures < 10) $display("FAIL tap %0d", j);
            end
          end
          p_prev = 0;
          for (int k = 0; k < 4; k++) p_prev += longint'(w[k]) * hist[k];
          have_prev = 1;
          x_new = L'($urandom);
          if (per == 5 || per == 6) x_new = -128;
          hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = int'(x_new);
        end
        @(negedge clk);
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
