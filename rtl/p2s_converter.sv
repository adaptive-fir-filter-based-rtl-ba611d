// Byte-parallel to bit-serial converter: turns four L-bit weights into the
// 4-bit weight slices that address a DA table. At the edge where load is
// high it takes the four weights; in each following cycle it presents bit l
// of every weight, l = 0 first, as a_slice = {w3_l, w2_l, w1_l, w0_l}, and
// shifts all four registers right by one. The LSB-first order follows the
// filter's description; load timing and the synchronous active-low reset
// are this design's choices.
module p2s_converter #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [L-1:0]  w [4],
  output logic [3:0]    a_slice
);
  logic [L-1:0] sr [4];
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      if (!rst_n)    sr[k] <= '0;
      else if (load) sr[k] <= w[k];
      else           sr[k] <= sr[k] >> 1;
    end
  end
  for (genvar k = 0; k < 4; k++) begin : g_out
    assign a_slice[k] = sr[k][0];
  end
endmodule
