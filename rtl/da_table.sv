// DA table of a four-point inner product.
// Holds in 15 registers every non-empty sum of the four most recent samples:
// entry k (1..15) is the sum of x(n-j) over the bits j set in k, so bit 0 of
// the address selects x(n), bit 3 selects x(n-3). Entry 0 is the constant 0.
// When load is high the table takes a new sample at the clock edge and all
// entries are renewed in parallel: an entry without x(n) becomes the old
// entry holding the same samples one step earlier (old entry k>>1), and each
// of the seven entries that contain x(n) together with older samples is the
// new sample plus such an old entry (seven adders); entry 1 is the new
// sample itself. Entries are kept at their natural widths (L bits for one
// sample, L+1 for two, L+2 for three or four) and read out sign-extended to
// L+2 bits. The 15 registers, seven adders and entry widths follow the
// filter's description; the load strobe and the synchronous active-low
// reset that clears the table are this design's choices.
module da_table #(
  parameter int unsigned L = da_lms_pkg::L_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic signed [L-1:0]    x_new,
  output logic signed [L+1:0]    entry [16]
);
  // entry widths follow the number of samples they sum
  function automatic int unsigned ent_w(input int unsigned k);
    int unsigned n;
    n = 0;
    for (int b = 0; b < 4; b++) n += (k >> b) & 1;
    return (n == 1) ? L : (n == 2) ? L + 1 : L + 2;
  endfunction

  logic signed [L+1:0] cur [16];   // sign-extended view of all registers
  assign cur[0] = '0;

  for (genvar k = 1; k < 16; k++) begin : g_ent
    localparam int unsigned EW = ent_w(k);
    logic signed [EW-1:0] r;
    logic signed [L+1:0]  upd;
    if (k == 1) begin : g_new
      assign upd = (L+2)'(x_new);
    end else if (k % 2 == 0) begin : g_shift
      assign upd = cur[k/2];
    end else begin : g_add
      assign upd = (L+2)'(x_new) + cur[(k-1)/2];
    end
    always_ff @(posedge clk) begin
      if (!rst_n)    r <= '0;
      else if (load) r <= upd[EW-1:0];
    end
    assign cur[k] = (L+2)'(r);
  end

  assign entry = cur;
endmodule
