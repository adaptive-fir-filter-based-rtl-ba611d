// Four-point DA inner-product block.
// Computes y = sum_k w_k * x(n-k) for k = 0..3 bit-serially over L cycles.
// The DA table holds all sums of the four latest samples; each cycle the
// 4-bit weight slice A = {w3_l, w2_l, w1_l, w0_l} (LSB slice first) selects
// one entry through a 16:1 multiplexer, and the carry-save accumulator adds
// it to half of the running value. The MSB slice arrives in the cycle where
// `last` is high and is subtracted (sign control). At the edge that closes
// that cycle the sum and carry words are latched into s_out/c_out, which
// hold them for the whole next sample period, and the DA table takes x_new.
// With weights read as fractions w/2^(L-1) and samples as integers,
// (s_out>>>1) + c_out + 1 equals y/2 to within about one LSB.
// taps gives x(n)..x(n-3) for the weight-increment logic and for chaining
// blocks into a longer filter (taps[3] feeds the next block's x_new).
module inner_product4 #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 last,
  input  logic signed [L-1:0]  x_new,
  input  logic [3:0]           a_slice,
  output logic signed [L-1:0]  taps [4],
  output logic signed [L+1:0]  s_out,
  output logic signed [L+1:0]  c_out
);
  logic signed [L+1:0] entry [16];
  logic [L+1:0] mux_out, s_nxt, c_nxt;

  da_table #(.L(L)) u_table (
    .clk, .rst_n, .load(last), .x_new, .entry
  );

  assign mux_out = entry[a_slice];

  csa_accumulator #(.W(L + 2)) u_acc (
    .clk, .rst_n, .clear(last), .sign_ctl(last), .y_in(mux_out),
    .s_nxt, .c_nxt
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_out <= '0;
      c_out <= '0;
    end else if (last) begin
      s_out <= s_nxt;
      c_out <= c_nxt;
    end
  end

  for (genvar j = 0; j < 4; j++) begin : g_taps
    assign taps[j] = entry[1 << j][L-1:0];
  end
endmodule
