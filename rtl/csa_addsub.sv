// Carry-save add/subtract cell of the weight-increment block.
// Forms both w + inc and w - inc: each path compresses its three operands
// (w, inc or ~inc, and 0 or a carry-in of 1 at the LSB) with a row of full
// adders into a sum and a carry word, which a final adder then combines.
// The sign of the error picks one of the two results outside this cell.
// Using a carry-save adder cell here follows the filter's description;
// forming both the sum and the difference, so that the sign-controlled
// multiplexer yields the updated weight, is this design's reading of it.
// Results wrap modulo 2^L (own choice). Combinational.
module csa_addsub #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic [L-1:0] w,
  input  logic [L-1:0] inc,
  output logic [L-1:0] sum_add,
  output logic [L-1:0] sum_sub
);
  logic [L-1:0] sa, ca, ss, cs, inv, one;
  assign inv = ~inc;
  assign one = L'(1);

  for (genvar i = 0; i < L; i++) begin : g_row
    full_adder u_add (.a(w[i]), .b(inc[i]), .cin(1'b0),   .s(sa[i]), .cout(ca[i]));
    full_adder u_sub (.a(w[i]), .b(inv[i]), .cin(one[i]), .s(ss[i]), .cout(cs[i]));
  end

  assign sum_add = sa + {ca[L-2:0], 1'b0};
  assign sum_sub = ss + {cs[L-2:0], 1'b0};
endmodule
