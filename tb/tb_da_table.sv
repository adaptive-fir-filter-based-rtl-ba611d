// Test of the DA table: random 8-bit samples are shifted in (with some idle
// cycles between loads); after every edge all 16 entries are compared with
// sums of the last four samples taken by the bench, entry k being the sum
// of x(n-j) over the bits j set in k.
module tb_da_table;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic load;
  logic signed [L-1:0] x_new;
  logic signed [L+1:0] entry [16];
  int checks = 0, failures = 0;
  int hist [4];
  int e;
  da_table #(.L(L)) dut (.clk, .rst_n, .load, .x_new, .entry);
  always #5 clk = ~clk;
  initial begin
    load = 0; x_new = '0;
    hist = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      load = ($urandom_range(0, 3) != 0);
      x_new = L'($urandom);
      if (it < 4) x_new = -128;
      if (load) begin
        hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0];
        hist[0] = int'(x_new);
      end
      @(negedge clk);
      for (int k = 0; k < 16; k++) begin
        e = 0;
        for (int j = 0; j < 4; j++) if (k[j]) e += hist[j];
        checks++;
        if (int'(entry[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL it %0d entry %0d = %0d exp %0d", it, k, entry[k], e);
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
