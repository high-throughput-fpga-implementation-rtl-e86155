// tb_sdct_top -- end-to-end test of the look-ahead sliding DCT at its
// default size (M = 32, beta = 0.99).
//
// Phases:
//   1. impulse: a single sample of 1.0 after reset; checks that nothing
//      appears before the pipeline latency of 8 clocks and that every bin
//      then shows k_m cos(m (M-1/2) pi / M), and that out_valid follows
//      in_valid by exactly 8 clocks.
//   2. white Gaussian input (sigma = 3), 1000 samples after a fresh reset:
//      every output of every bin is compared with a floating-point damped
//      window DCT; each error must stay below TOL and the RMS error over
//      all bins and samples below RMSE_MAX; the RMS error over the bins at
//      any single sliding index must stay below 2 * RMSE_MAX.
//   3. full-scale positive input: the recursion state saturates at the top
//      of Q7.8, so X_0 must settle at the clipped value 2 * (2^14-1)/2^8
//      times the quantised output coefficient instead of wrapping.
// Each mechanism (latency, even and odd comb groups, saturation, reset) is
// counted, and one that never happened counts as a failure.
module tb_sdct_top;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;

  localparam int  M        = 32;
  localparam real BETA     = 0.99;
  localparam real TOL      = 0.4;
  localparam real RMSE_MAX = 0.08;
  localparam int  NGAUSS   = 1000;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  x_t   x_in;
  logic out_valid;
  s_t   x_out [M];

  sdct_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(input s_t v);
    return real'(v) / 256.0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Input history for the reference (newest first), as real values of the
  // quantised samples actually applied.
  real hist [];
  real refs [16][M];  // reference outputs, indexed by sample number mod 16

  int n_latency = 0, n_even = 0, n_odd = 0, n_sat = 0, n_reset = 0;

  task automatic do_reset();
    rst_n    <= 1'b0;
    in_valid <= 1'b0;
    x_in     <= '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (hist[k]) hist[k] = 0.0;
    n_reset++;
  endtask

  real se = 0.0;
  int  ne = 0;
  real maxerr = 0.0;

  // Compare every bin with the stored reference of sample 'idx'.
  real rmse_n_sum = 0.0, rmse_n_max = 0.0;
  int  rmse_n_cnt = 0;

  task automatic compare(input int idx);
    real sn;
    sn = 0.0;
    for (int m = 0; m < M; m++) begin
      real e, ae;
      e  = to_real(x_out[m]) - refs[idx % 16][m];
      ae = (e < 0.0) ? -e : e;
      se += e * e;
      sn += e * e;
      ne++;
      if (ae > maxerr) maxerr = ae;
      check(ae <= TOL, $sformatf("sample %0d bin %0d: got %f expected %f",
                                  idx, m, to_real(x_out[m]), refs[idx % 16][m]));
      if (m % 2 == 0) n_even++;
      else            n_odd++;
    end
    // RMSE over all bins at this sliding index.
    sn = $sqrt(sn / M);
    rmse_n_sum += sn;
    rmse_n_cnt++;
    if (sn > rmse_n_max) rmse_n_max = sn;
  endtask

  // Stream 'n' samples (from gen_sample) and check each output LATENCY
  // clocks later. Inputs change on the falling edge.
  task automatic stream(input int n, input real sigma);
    for (int k = 0; k < n + LATENCY; k++) begin
      @(negedge clk);
      if (k >= LATENCY) compare(k - LATENCY);
      if (k < n) begin
        x_t s;
        s = x_t'(clip(round_even(gauss(sigma) * 128.0), X_W));
        x_in     = s;
        in_valid = 1'b1;
        for (int j = M - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = real'(s) / 128.0;
      end else begin
        x_in     = '0;
        in_valid = 1'b0;
        for (int j = M - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = 0.0;
      end
      for (int m = 0; m < M; m++) refs[k % 16][m] = sdct_ref(hist, m, M, BETA);
    end
  endtask

  initial begin
    int t_out;
    real expect0;
    hist = new[M];

    // ---- 1. impulse and latency ----
    do_reset();
    @(posedge clk);
    x_in <= 14'sd128;  // 1.0
    in_valid <= 1'b1;
    @(posedge clk);
    x_in <= '0;
    in_valid <= 1'b0;
    t_out = -1;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk);
      if (t_out < 0 && out_valid) t_out = i + 1;
      if (i + 1 < LATENCY) begin
        for (int m = 0; m < M; m++)
          check(x_out[m] == '0, $sformatf("bin %0d nonzero %0d clocks after impulse", m, i + 1));
      end
      if (i + 1 == LATENCY) begin
        for (int m = 0; m < M; m++) begin
          real want, got;
          want = ((m == 0) ? 1.0 / $sqrt(2.0) : 1.0) * $cos(m * (M - 0.5) * PI / M);
          got  = to_real(x_out[m]);
          check((got - want < 0.02) && (want - got < 0.02),
                $sformatf("impulse bin %0d: got %f expected %f", m, got, want));
        end
        n_latency++;
      end
    end
    check(t_out == LATENCY, $sformatf("out_valid after %0d clocks", t_out));

    // ---- 2. white Gaussian input ----
    do_reset();
    stream(NGAUSS, 3.0);
    $display("gaussian: %0d outputs, RMSE %f, max error %f", ne, $sqrt(se / ne), maxerr);
    check($sqrt(se / ne) <= RMSE_MAX, "RMSE too large");
    $display("RMSE over bins per sliding index: mean %f, max %f", rmse_n_sum / rmse_n_cnt, rmse_n_max);
    check(rmse_n_max <= 2.0 * RMSE_MAX, "RMSE at one sliding index too large");

    // ---- 3. saturation ----
    do_reset();
    for (int i = 0; i < 4 * M; i++) begin
      x_in <= 14'sh1fff;
      in_valid <= 1'b1;
      @(posedge clk);
    end
    @(negedge clk);
    expect0 = 2.0 * 16383.0 / 256.0 * real'(out_coef(0, M).re) / 2048.0;
    check((to_real(x_out[0]) - expect0 < 0.02) && (expect0 - to_real(x_out[0]) < 0.02),
          $sformatf("saturated X_0 = %f, expected %f", to_real(x_out[0]), expect0));
    if ((to_real(x_out[0]) - expect0 < 0.02) && (expect0 - to_real(x_out[0]) < 0.02)) n_sat++;

    $display("mechanisms: latency=%0d even_bins=%0d odd_bins=%0d saturation=%0d reset=%0d",
             n_latency, n_even, n_odd, n_sat, n_reset);
    check(n_latency > 0, "latency never checked");
    check(n_even > 0 && n_odd > 0, "a comb group never checked");
    check(n_sat > 0, "saturation never happened");
    check(n_reset > 1, "reset during operation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
