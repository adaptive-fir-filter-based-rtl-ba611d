// Sign-magnitude separator: splits the scaled error mu*e (L-bit two's
// complement) into its sign bit and an (L-1)-bit magnitude. The most
// negative value, whose magnitude needs L bits, is clamped to the largest
// (L-1)-bit magnitude. The block and its widths follow the filter's
// structure; forming the absolute value and the clamp are this design's
// choices. Combinational.
module sign_mag_separator #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic signed [L-1:0] mu_e,
  output logic                sign,
  output logic [L-2:0]        mag
);
  logic [L-1:0] neg;
  assign sign = mu_e[L-1];
  assign neg  = -mu_e;
  always_comb begin
    if (!sign)          mag = mu_e[L-2:0];
    else if (neg[L-1])  mag = '1;            // -2^(L-1)
    else                mag = neg[L-2:0];
  end
endmodule
