// Output and error path of the filter.
// The final adder combines the accumulated sum and carry words,
//   y = (s >>> 1) + c + 1,
// whose carry input of 1 completes the negation of the MSB slice. The
// desired response d is registered once per sample period (it is supplied
// one sample after the matching input sample), then e = d - y is formed and
// scaled down by 2^(YW-L) to L bits; this arithmetic shift is the step size
// mu. The result is registered at the period boundary as mu*e, two samples
// behind the input (adaptation delay 2). Values beyond L bits saturate
// (this design's choice; the scaling itself only drops bits).
// Synchronous active-low reset.
module error_unit #(
  parameter int unsigned L  = da_lms_pkg::L_DEF,
  parameter int unsigned YW = L + 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic signed [YW-1:0]  s,
  input  logic signed [YW-1:0]  c,
  input  logic signed [YW-1:0]  d,
  output logic signed [YW-1:0]  y,
  output logic signed [L-1:0]   mu_e
);
  localparam int unsigned SH = YW - L;
  localparam logic signed [YW:0] MAXV = (YW+1)'((1 << (L - 1)) - 1);
  localparam logic signed [YW:0] MINV = -(YW+1)'(1 << (L - 1));

  logic signed [YW-1:0] d_q;
  logic signed [YW:0]   e, e_sc;
  logic signed [L-1:0]  mu_e_nxt;

  assign y    = (s >>> 1) + c + YW'(1);
  assign e    = (YW+1)'(d_q) - (YW+1)'(y);
  assign e_sc = e >>> SH;

  always_comb begin
    if (e_sc > MAXV)      mu_e_nxt = MAXV[L-1:0];
    else if (e_sc < MINV) mu_e_nxt = MINV[L-1:0];
    else                  mu_e_nxt = e_sc[L-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_q  <= '0;
      mu_e <= '0;
    end else if (load) begin
      d_q  <= d;
      mu_e <= mu_e_nxt;
    end
  end
endmodule
