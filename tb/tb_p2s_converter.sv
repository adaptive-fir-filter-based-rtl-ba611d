// Test of the byte-parallel to bit-serial converter: four random words are
// loaded, then for L cycles slice l must equal bit l of each word.
module tb_p2s_converter;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic load;
  logic [L-1:0] w [4];
  logic [L-1:0] keep [4];
  logic [3:0] a_slice;
  int checks = 0, failures = 0;
  p2s_converter #(.L(L)) dut (.clk, .rst_n, .load, .w, .a_slice);
  always #5 clk = ~clk;
  initial begin
    load = 0;
    for (int k = 0; k < 4; k++) w[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      for (int k = 0; k < 4; k++) begin
        w[k] = L'($urandom);
        keep[k] = w[k];
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < 4; k++) w[k] = L'($urandom);   // must be ignored
      for (int l = 0; l < L; l++) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (a_slice[k] !== keep[k][l]) begin
            failures++;
            if (failures < 10) $display("FAIL it %0d bit %0d word %0d", it, l, k);
          end
        end
        if (l < L - 1) @(negedge clk);
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
