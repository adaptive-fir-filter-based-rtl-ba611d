// DA-based delayed-LMS adaptive FIR filter (top level).
// An N-tap adaptive filter built from N/4 four-point distributed-arithmetic
// inner-product blocks and N/4 weight-increment blocks. Samples move through
// the DA tables of the inner-product blocks like a delay line (block j holds
// x(n-4j)..x(n-4j-3)). During each sample period of L clock cycles the
// weight-increment blocks stream the weights bit-serially into the tables'
// multiplexers and every block accumulates its partial inner product in
// carry-save form. Two adder trees sum the blocks' sum words and carry
// words; the error unit forms y = (s>>>1) + c + 1, e = d - y, scales e to L
// bits (mu) and registers it. The sign of mu*e and the position of the
// leading one of its magnitude (control word t) drive the weight update
//   w_k(n+1) = w_k(n) + sign(mu*e(n-2)) * 2^-t * x(n-2-k),
// so the error is approximated by a signed power of two and the update uses
// samples two periods old (adaptation delay 2). Block j's weights need
// x(n-2-4j)..x(n-5-4j): two come from its own DA table, two from the next
// block's, and the last block uses two extra sample-rate registers.
//
// Interface and timing: sample_req is high in the last cycle of each sample
// period; at the closing edge of that cycle x_in is taken as x(n+1) and
// d_in as d(n), the desired response of the sample taken one period
// earlier. y_out is y(n) for the sample whose period just ended and is
// valid for the whole following period; mu_e is mu*e of the sample two
// periods back. With weights read as fractions w/2^(L-1), y_out equals
// sum_k w_k x(n-k) / 2 to within about one LSB. adapt_en enables the weight
// update. Weights, tables and registers reset to zero (synchronous, active
// low). The structure, widths, delay 2 and shift-based step follow the
// filter's description; the cycle-level control, the zero-error code and
// the saturation of mu*e are choices of this design.
module da_lms_filter #(
  parameter int unsigned L = da_lms_pkg::L_DEF,
  parameter int unsigned N = da_lms_pkg::N_DEF,
  localparam int unsigned NB = N / 4,
  localparam int unsigned YW = L + 2 + $clog2(NB)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adapt_en,
  input  logic signed [L-1:0]   x_in,
  input  logic signed [YW-1:0]  d_in,
  output logic                  sample_req,
  output logic signed [YW-1:0]  y_out,
  output logic signed [L-1:0]   mu_e,
  output logic [L-1:0]          weights [N]
);
  logic                      last;
  logic signed [L-1:0]       taps   [NB][4];
  logic signed [L-1:0]       x_chain[NB];
  logic signed [L+1:0]       s_blk  [NB];
  logic signed [L+1:0]       c_blk  [NB];
  logic [3:0]                a_blk  [NB];
  logic signed [YW-1:0]      s_sum, c_sum;
  logic signed [L-1:0]       x_d1, x_d2;   // x(n-N), x(n-N-1)
  logic                      e_sign;
  logic [L-2:0]              e_mag;
  logic [da_lms_pkg::TW-1:0] t;

  bit_controller #(.L(L)) u_ctl (.clk, .rst_n, .last);
  assign sample_req = last;

  // inner-product blocks chained through their oldest tap
  for (genvar j = 0; j < int'(NB); j++) begin : g_ip
    assign x_chain[j] = (j == 0) ? x_in : taps[(j == 0) ? 0 : j - 1][3];
    inner_product4 #(.L(L)) u_ip (
      .clk, .rst_n, .last, .x_new(x_chain[j]), .a_slice(a_blk[j]),
      .taps(taps[j]), .s_out(s_blk[j]), .c_out(c_blk[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_d1 <= '0;
      x_d2 <= '0;
    end else if (last) begin
      x_d1 <= taps[NB-1][3];
      x_d2 <= x_d1;
    end
  end

  adder_tree #(.NB(NB), .W(L + 2)) u_s_tree (.in(s_blk), .sum(s_sum));
  adder_tree #(.NB(NB), .W(L + 2)) u_c_tree (.in(c_blk), .sum(c_sum));

  error_unit #(.L(L), .YW(YW)) u_err (
    .clk, .rst_n, .load(last), .s(s_sum), .c(c_sum), .d(d_in), .y(y_out), .mu_e
  );

  sign_mag_separator #(.L(L)) u_smag (.mu_e, .sign(e_sign), .mag(e_mag));
  control_word_gen   #(.L(L)) u_cwg  (.mag(e_mag), .t);

  // weight-increment blocks: block j updates w_{4j}..w_{4j+3}
  for (genvar j = 0; j < int'(NB); j++) begin : g_wi
    logic signed [L-1:0] xw [4];
    logic [L-1:0]        wj [4];
    assign xw[0] = taps[j][2];
    assign xw[1] = taps[j][3];
    if (j + 1 < int'(NB)) begin : g_mid
      assign xw[2] = taps[j+1][0];
      assign xw[3] = taps[j+1][1];
    end else begin : g_end
      assign xw[2] = x_d1;
      assign xw[3] = x_d2;
    end
    weight_increment4 #(.L(L)) u_wi (
      .clk, .rst_n, .load(last), .adapt_en, .x(xw), .t, .sign(e_sign),
      .a_slice(a_blk[j]), .w(wj)
    );
    for (genvar k = 0; k < 4; k++) begin : g_w
      assign weights[4*j+k] = wj[k];
    end
  end
endmodule
