// Exhaustive test of the carry-save add/subtract cell for 8-bit words:
// both outputs compared with (w + inc) mod 256 and (w - inc) mod 256.
module tb_csa_addsub;
  localparam int L = 8;
  logic [L-1:0] w, inc, sum_add, sum_sub;
  int checks = 0, failures = 0;
  csa_addsub #(.L(L)) dut (.w, .inc, .sum_add, .sum_sub);
  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        w = L'(a);
        inc = L'(b);
        #1;
        checks += 2;
        if (int'(sum_add) != ((a + b) & 255)) begin
          failures++;
          if (failures < 10) $display("FAIL add %0d+%0d=%0d", a, b, sum_add);
        end
        if (int'(sum_sub) != ((a - b + 256) & 255)) begin
          failures++;
          if (failures < 10) $display("FAIL sub %0d-%0d=%0d", a, b, sum_sub);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
