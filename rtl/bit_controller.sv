// Bit-cycle controller. One sample period of the bit-serial filter lasts L
// clock cycles, one per weight bit slice, LSB first. This counter numbers the
// cycles 0..L-1 and raises `last` in cycle L-1: that is the MSB slice (sign
// control of the accumulators) and also the sample-period boundary, at whose
// closing edge new samples are taken, accumulator results are latched and
// weights are updated. The counter is this design's own; the document only
// shows a bit clock. Synchronous active-low reset to cycle 0.
module bit_controller #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   last
);
  logic [$clog2(L)-1:0] cnt;
  assign last = (cnt == ($clog2(L))'(L - 1));
  always_ff @(posedge clk) begin
    if (!rst_n)    cnt <= '0;
    else if (last) cnt <= '0;
    else           cnt <= cnt + 1'b1;
  end
endmodule
