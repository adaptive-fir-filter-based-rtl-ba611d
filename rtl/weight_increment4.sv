// Weight-increment block for four taps of the delayed-LMS update
//   w_k(n+1) = w_k(n) + sign(mu*e(n-2)) * 2^-t * x(n-2-k).
// Four barrel shifters scale the delayed samples x by 2^-t, four carry-save
// add/subtract cells form w_k + inc and w_k - inc, and a 2:1 multiplexer per
// tap, steered by the error sign, picks the sum for a positive error and the
// difference for a negative one. The weights live in registers; at the
// sample-period boundary (load high) they take the new values (when
// adapt_en is high) and the byte-parallel to bit-serial converter is loaded
// with them, so the slices of the updated weights are on a_slice in the L
// cycles that follow. Weights wrap modulo 2^L (no saturation). Weights reset
// to zero; w is exposed for observation.
module weight_increment4 #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load,
  input  logic                        adapt_en,
  input  logic signed [L-1:0]         x [4],
  input  logic [da_lms_pkg::TW-1:0]   t,
  input  logic                        sign,
  output logic [3:0]                  a_slice,
  output logic [L-1:0]                w [4]
);
  logic [L-1:0] inc [4];
  logic [L-1:0] w_add [4];
  logic [L-1:0] w_sub [4];
  logic [L-1:0] w_nxt [4];
  logic [L-1:0] w_ld  [4];

  for (genvar k = 0; k < 4; k++) begin : g_tap
    barrel_shifter #(.L(L)) u_bs (.x(x[k]), .t, .y(inc[k]));
    csa_addsub     #(.L(L)) u_cs (.w(w[k]), .inc(inc[k]), .sum_add(w_add[k]), .sum_sub(w_sub[k]));
    assign w_nxt[k] = sign ? w_sub[k] : w_add[k];
    assign w_ld[k]  = adapt_en ? w_nxt[k] : w[k];

    always_ff @(posedge clk) begin
      if (!rst_n)    w[k] <= '0;
      else if (load) w[k] <= w_ld[k];
    end
  end

  p2s_converter #(.L(L)) u_p2s (.clk, .rst_n, .load, .w(w_ld), .a_slice);
endmodule
