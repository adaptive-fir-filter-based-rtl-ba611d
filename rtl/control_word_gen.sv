// Control-word generator: a priority encoder over the (L-1)-bit error
// magnitude. The position of its leading one gives the barrel-shifter
// control word t: for L = 8, bit r6 set gives t = 0, r5 gives 1, ... and r0
// gives 6, so mu*e is approximated by a power of two. A zero magnitude
// gives T_ZERO (3'b111), the "no increment" code (this design's choice).
// For other L the count is the number of leading zeros, saturating at
// T_ZERO. Combinational.
module control_word_gen #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic [L-2:0]                mag,
  output logic [da_lms_pkg::TW-1:0]   t
);
  always_comb begin
    t = da_lms_pkg::T_ZERO;
    for (int i = 0; i < int'(L) - 1; i++) begin
      if (mag[i]) t = (L - 2 - i > int'(da_lms_pkg::T_ZERO) - 1) ?
                      da_lms_pkg::TW'(int'(da_lms_pkg::T_ZERO) - 1) :
                      da_lms_pkg::TW'(L - 2 - i);
    end
  end
endmodule
