// Barrel shifter of the weight-increment block: shifts a sample right by t
// places (arithmetic shift, sign kept), which multiplies it by the
// power-of-two approximation 2^-t of the scaled error magnitude.
// The control word T_ZERO (3'b111) marks a zero error and gives a zero
// increment; that code is this design's choice. Built as log2 stages of
// 2:1 multiplexers. Combinational.
module barrel_shifter #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic signed [L-1:0]             x,
  input  logic [da_lms_pkg::TW-1:0]       t,
  output logic signed [L-1:0]             y
);
  logic signed [L-1:0] st [da_lms_pkg::TW+1];
  assign st[0] = x;
  for (genvar b = 0; b < int'(da_lms_pkg::TW); b++) begin : g_stage
    assign st[b+1] = t[b] ? (st[b] >>> (1 << b)) : st[b];
  end
  assign y = (t == da_lms_pkg::T_ZERO) ? '0 : st[da_lms_pkg::TW];
endmodule
