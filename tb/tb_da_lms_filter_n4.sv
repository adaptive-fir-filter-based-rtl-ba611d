// End-to-end test of the 4-tap configuration of the DA LMS adaptive filter
// (L = 8, N = 4: one inner-product block, error scaled down by 4), as a
// system-identification run: the desired signal is the output of a fixed random 4-tap FIR "unknown system" driven by the
// same random input. Every sample period the bench
//   - checks all 4 weights against its own delayed-LMS model
//     w_k += sign(mu*e(n-2)) * 2^-t * x(n-2-k) (t from the leading one of
//     |mu*e|, no change for zero error), fed with the mu*e the filter reports;
//   - checks y_out, one period after its samples, within 2 LSB of
//     sum_k w_k x(n-k) / 256 computed with the model weights;
//   - checks mu_e, two periods after its sample, against floor((d - y)/4)
//     saturated to 8 bits;
//   - checks that sample_req recurs every 8 clocks (one bit per cycle).
// The y check allows the small negative bias of the bit-serial arithmetic:
// each four-point block truncates and completes its MSB negation only
// once for all blocks, so y lies between ideal - (N/8 + 1.5) and ideal + 1.
// A few samples of the desired signal carry large disturbances so that the
// error saturates and every shift value 0..6 is used.
// It counts the mechanisms of the filter (positive and negative updates,
// zero-error periods, each shift value, frozen adaptation, saturation of
// mu*e) and fails if any of them never occurred, and it requires the weights
// to end within a quarter of their initial distance from the unknown
// system and the mean error of the last samples to be below that of the
// first ones.
module tb_da_lms_filter_n4;
  localparam int L = 8, N = 4, YW = 10, SH = YW - L;
  localparam int NS = 3000;          // samples

  logic clk = 0, rst_n = 0;
  logic adapt_en;
  logic signed [L-1:0] x_in;
  logic signed [YW-1:0] d_in;
  logic sample_req;
  logic signed [YW-1:0] y_out;
  logic signed [L-1:0] mu_e;
  logic [L-1:0] weights [N];

  int checks = 0, failures = 0;
  int xs [-N-4:NS+4];
  int ds [-4:NS+4];
  int yo [-4:NS+4];
  int h [N];
  int wr [N];
  int wp [N];
  int cnt_pos, cnt_neg, cnt_zero, cnt_frozen, cnt_sat;
  int cnt_t [8];
  int err_first, err_last;
  int last_req_cyc, cyc;
  int dist0, dist1;
  bit freeze;

  da_lms_filter #(.L(L), .N(N)) dut (
    .clk, .rst_n, .adapt_en, .x_in, .d_in, .sample_req, .y_out, .mu_e, .weights
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int wsigned(input int v);
    return (v & 255) >= 128 ? (v & 255) - 256 : (v & 255);
  endfunction

  function automatic int tword(input int m);
    int mag, tt;
    mag = (m < 0) ? -m : m;
    if (mag > 127) mag = 127;
    if (mag == 0) return 7;
    tt = 0;
    while ((mag << tt) < 64) tt++;
    return tt;
  endfunction

  task automatic check(input bit ok, input string what, input int q);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL period %0d: %s", q, what);
    end
  endtask

  initial begin
    int q, acc, ev, tt, inc, m;
    real ideal;
    longint p;
    cyc = 0;
    adapt_en = 1; x_in = '0; d_in = '0;
    cnt_pos = 0; cnt_neg = 0; cnt_zero = 0; cnt_frozen = 0; cnt_sat = 0;
    for (int i = 0; i < 8; i++) cnt_t[i] = 0;
    err_first = 0; err_last = 0;
    for (int i = -N-4; i <= NS+4; i++) xs[i] = 0;
    for (int i = -4; i <= NS+4; i++) begin ds[i] = 0; yo[i] = 0; end
    for (int k = 0; k < N; k++) begin
      h[k] = int'($urandom_range(0, 160)) - 80;
      wr[k] = 0;
    end
    for (int i = 0; i < NS; i++) begin
      xs[i] = int'($urandom_range(0, 255)) - 128;
      if (i < 4) xs[i] = 127;       // large start-up error: saturates mu*e
    end
    for (int i = 0; i < NS; i++) begin
      acc = 0;
      for (int k = 0; k < N; k++) acc += h[k] * xs[i-k];
      ds[i] = acc >>> 8;
      // impulsive disturbances of the desired signal: large errors
      if (i >= 1000 && i < 1006) ds[i] = (i % 2 == 0) ? 511 : -512;
      if (i >= 1100 && i < 1104) ds[i] = ds[i] + ((i % 2 == 0) ? 200 : -200);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    last_req_cyc = -1;
    q = -1;
    while (q < NS - 1) begin
      @(negedge clk);
      if (!sample_req) continue;
      if (last_req_cyc >= 0) check(cyc - last_req_cyc == L, "sample period length", q);
      last_req_cyc = cyc;
      if (q >= 0) begin
        // weights used in this period
        for (int k = 0; k < N; k++)
          check(int'(weights[k]) == (wr[k] & 255), $sformatf("weight %0d = %0d, model %0d", k, weights[k], wr[k] & 255), q);
      end
      if (q >= 1) begin
        p = 0;
        for (int k = 0; k < N; k++) p += longint'(wsigned(wp[k])) * xs[q-1-k];
        ideal = real'(p) / 256.0;
        check(real'(y_out) - ideal <= 1.0 && ideal - real'(y_out) <= real'(N / 4) / 2.0 + 1.5,
              $sformatf("y %0d ideal %f", int'(y_out), ideal), q);
        yo[q-1] = int'(y_out);
        ev = ds[q-1] - yo[q-1];
        if (q - 1 < 200) err_first += (ev < 0) ? -ev : ev;
        if (q - 1 >= NS - 501 && q - 1 < NS - 1) err_last += (ev < 0) ? -ev : ev;
      end
      if (q >= 2) begin
        ev = (ds[q-2] - yo[q-2]) >>> SH;
        if (ev > 127 || ev < -128) cnt_sat++;
        if (ev > 127) ev = 127;
        if (ev < -128) ev = -128;
        check(int'(mu_e) == ev, $sformatf("mu_e %0d exp %0d", mu_e, ev), q);
      end
      // update model for the edge that closes this period
      freeze = (q >= 1500 && q < 1520);
      m = int'(mu_e);
      tt = tword(m);
      if (!freeze) begin
        if (tt == 7) cnt_zero++;
        else if (m < 0) cnt_neg++;
        else cnt_pos++;
        cnt_t[tt]++;
      end else if (tt != 7) cnt_frozen++;
      for (int k = 0; k < N; k++) begin
        wp[k] = wr[k];
        if (!freeze && tt != 7) begin
          inc = xs[q-2-k] >>> tt;
          wr[k] = (m < 0) ? wr[k] - inc : wr[k] + inc;
          wr[k] = wsigned(wr[k]);
        end
      end
      adapt_en = !freeze;
      x_in = L'(xs[q+1]);
      d_in = (q >= 0) ? YW'(ds[q]) : '0;
      q++;
    end
    $display("updates: pos=%0d neg=%0d zero=%0d frozen=%0d mu_e_saturated=%0d", cnt_pos, cnt_neg, cnt_zero, cnt_frozen, cnt_sat);
    for (int i = 0; i < 7; i++) $display("t=%0d used %0d times", i, cnt_t[i]);
    $display("mean |e| first 200: %f  last 500: %f", real'(err_first) / 200.0, real'(err_last) / 500.0);
    check(cnt_pos > 0, "no positive update", q);
    check(cnt_neg > 0, "no negative update", q);
    check(cnt_zero > 0, "no zero-error period", q);
    check(cnt_frozen > 0, "no frozen period with non-zero error", q);
    check(cnt_sat > 0, "mu*e never saturated", q);
    for (int i = 0; i < 7; i++) check(cnt_t[i] > 0, $sformatf("shift %0d never used", i), q);
    dist0 = 0; dist1 = 0;
    for (int k = 0; k < N; k++) begin
      dist0 += (h[k] < 0) ? -h[k] : h[k];
      dist1 += (wr[k] - h[k] < 0) ? h[k] - wr[k] : wr[k] - h[k];
    end
    $display("sum |w - h|: start %0d  end %0d", dist0, dist1);
    check(dist1 * 4 < dist0, "weights did not approach the unknown system", q);
    check(real'(err_last) / 500.0 < real'(err_first) / 200.0, "error did not shrink", q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * L + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
