// Adder tree that combines the sum (or carry) words of NB inner-product
// blocks. Level v adds pairs from level v-1 and is one bit wider, as in the
// 16-tap filter, where four L+2-bit words become two L+3-bit and then one
// L+4-bit word. Writing it for any power-of-two NB is this design's
// generalisation; NB must be a power of two. Inputs are two's complement;
// combinational.
module adder_tree #(
  parameter int unsigned NB = 4,
  parameter int unsigned W  = 10,
  localparam int unsigned LV = $clog2(NB)
) (
  input  logic signed [W-1:0]     in  [NB],
  output logic signed [W+LV-1:0]  sum
);
  for (genvar v = 0; v <= int'(LV); v++) begin : g_lv
    logic signed [W+v-1:0] node [NB >> v];
    for (genvar i = 0; i < int'(NB >> v); i++) begin : g_node
      if (v == 0) begin : g_leaf
        assign node[i] = in[i];
      end else begin : g_add
        assign node[i] = (W+v)'(g_lv[v-1].node[2*i]) + (W+v)'(g_lv[v-1].node[2*i+1]);
      end
    end
  end
  assign sum = g_lv[LV].node[0];
endmodule
