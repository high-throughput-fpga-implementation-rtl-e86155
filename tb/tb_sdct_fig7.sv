// tb_sdct_fig7 -- sliding transform against the exact block DCT.
//
// Workload: white Gaussian input (sigma = 3), sliding indices n = 0..100,
// bins m = 1, 11 and 21 of the default design (M = 32, beta = 0.99).
// Three signals are compared for each n:
//   * the hardware output X_m(n),
//   * the floating-point damped sliding DCT (the same transform in exact
//     arithmetic): the hardware must be within TOL of it at every n,
//   * the undamped block DCT-II of the window x(n-M+1..n) (zeros before
//     n = 0). The damping beta^k makes the two differ slightly; the RMS
//     difference relative to the RMS of the block DCT must stay below
//     REL_MAX, i.e. the sliding transform must track the true DCT.
module tb_sdct_fig7;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;

  localparam int  M       = 32;
  localparam real BETA    = 0.99;
  localparam int  N       = 101;
  localparam int  NB      = 3;
  localparam int  BINS [NB] = '{1, 11, 21};
  localparam real TOL     = 0.4;
  localparam real REL_MAX = 0.3;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  x_t   x_in;
  logic out_valid;
  s_t   x_out [M];

  sdct_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hist [];
  real sref [16][NB], bref [16][NB];
  real d2 [NB], b2 [NB], maxe [NB];

  initial begin
    hist = new[M];
    foreach (hist[k]) hist[k] = 0.0;
    for (int b = 0; b < NB; b++) begin d2[b] = 0; b2[b] = 0; maxe[b] = 0; end
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N + LATENCY; k++) begin
      @(negedge clk);
      if (k >= LATENCY) begin
        for (int b = 0; b < NB; b++) begin
          real hw, e, ae;
          hw = real'(x_out[BINS[b]]) / 256.0;
          e  = hw - sref[(k - LATENCY) % 16][b];
          ae = (e < 0.0) ? -e : e;
          if (ae > maxe[b]) maxe[b] = ae;
          checks++;
          if (ae > TOL) begin
            failures++;
            $display("FAIL n=%0d X_%0d: %f vs sliding reference %f", k - LATENCY, BINS[b], hw,
                     sref[(k - LATENCY) % 16][b]);
          end
          d2[b] += (hw - bref[(k - LATENCY) % 16][b]) ** 2;
          b2[b] += bref[(k - LATENCY) % 16][b] ** 2;
        end
      end
      if (k < N) begin
        x_t s;
        s = x_t'(clip(round_even(gauss(3.0) * 128.0), X_W));
        x_in = s;
        in_valid = 1'b1;
        for (int j = M - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = real'(s) / 128.0;
        for (int b = 0; b < NB; b++) begin
          sref[k % 16][b] = sdct_ref(hist, BINS[b], M, BETA);
          bref[k % 16][b] = sdct_ref(hist, BINS[b], M, 1.0);
        end
      end else begin
        x_in = '0;
        in_valid = 1'b0;
      end
    end
    for (int b = 0; b < NB; b++) begin
      real rel;
      rel = $sqrt(d2[b] / b2[b]);
      $display("X_%0d: max error vs sliding reference %f, RMS difference to block DCT %f of its RMS",
               BINS[b], maxe[b], rel);
      checks++;
      if (rel > REL_MAX) begin
        failures++;
        $display("FAIL X_%0d does not track the block DCT", BINS[b]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
