// Exhaustive test of the barrel shifter: every 8-bit sample and every
// control word. Expected value: floor(x / 2^t) for t = 0..6, zero for t = 7.
module tb_barrel_shifter;
  localparam int L = 8;
  logic signed [L-1:0] x, y;
  logic [2:0] t;
  int checks = 0, failures = 0;
  int expv;
  barrel_shifter #(.L(L)) dut (.x, .t, .y);
  initial begin
    for (int xv = -128; xv < 128; xv++) begin
      for (int tv = 0; tv < 8; tv++) begin
        x = L'(xv);
        t = 3'(tv);
        #1;
        if (tv == 7) expv = 0;
        else expv = int'($floor(real'(xv) / real'(1 << tv)));
        checks++;
        if (int'(y) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d t=%0d y=%0d exp=%0d", xv, tv, y, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
