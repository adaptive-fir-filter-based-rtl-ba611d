// Carry-save shift accumulator for bit-serial distributed arithmetic.
// Each bit cycle it adds one partial sum y_in to half of the value held so
// far, without propagating carries: a row of W full adders takes bit i of
// the operand, bit i+1 of the sum word (the sum word shifted right by one,
// sign-extended) and bit i of the carry word. The held value is S + 2*C with
// S and C read as W-bit two's-complement words; the row keeps that identity
// exactly, so only the sum-word LSB dropped by each shift is lost.
// Partial sums arrive LSB slice first; on the MSB slice sign_ctl inverts the
// operand (one's complement), and the "+1" that completes the negation is
// added later by the final adder as its carry input.
// Timing: s_nxt/c_nxt are the combinational results of the current cycle,
// held in the internal registers s/c at each edge. clear makes the registers restart from zero at the
// next edge (used in the last bit cycle, when s_nxt/c_nxt are captured
// elsewhere). Synchronous active-low reset.
module csa_accumulator #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         sign_ctl,
  input  logic [W-1:0] y_in,
  output logic [W-1:0] s_nxt,
  output logic [W-1:0] c_nxt
);
  logic [W-1:0] s, c;           // sum and carry words
  logic [W-1:0] opnd, s_sh;

  assign opnd = y_in ^ {W{sign_ctl}};
  assign s_sh = {s[W-1], s[W-1:1]};

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(opnd[i]), .b(s_sh[i]), .cin(c[i]), .s(s_nxt[i]), .cout(c_nxt[i]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      s <= '0;
      c <= '0;
    end else begin
      s <= s_nxt;
      c <= c_nxt;
    end
  end
endmodule
