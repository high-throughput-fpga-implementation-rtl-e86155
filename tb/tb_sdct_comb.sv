// tb_sdct_comb -- checks the shared input comb.
//
// With a small window (M = 5, beta = 0.9) random samples are streamed and
// u_even / u_odd are compared, one clock after each sample, with
// x(n) -/+ round(beta^M x(n-M)), both rounded to even and clipped to Q7.7.
// The first M outputs after reset must see a zero history. Saturation of
// the adders is provoked by full-scale samples.
module tb_sdct_comb;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;

  localparam int  M    = 5;
  localparam real BETA = 0.9;

  logic clk = 1'b0, rst_n;
  x_t   x, u_even, u_odd;

  sdct_comb #(.M(M), .BETA(BETA)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hist [$];
  longint bm;

  initial begin
    bm = longint'($floor((BETA ** M) * 128.0 + 0.5));
    rst_n = 1'b0;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < M; k++) hist.push_front(0);
    for (int i = 0; i < 2000; i++) begin
      longint s, old, v, we, wo;
      if (i % 200 < 20) s = (i % 2 == 0) ? 8191 : -8192;   // full scale
      else              s = longint'(signed'(14'($urandom)));
      x = x_t'(s);
      old = hist[M-1];
      v   = rnd_sat(old * bm, 7, 14);
      we  = clip(s - v, 14);
      wo  = clip(s + v, 14);
      if (we != s - v || wo != s + v) n_sat++;
      hist.push_front(s);
      void'(hist.pop_back());
      @(negedge clk);
      checks += 2;
      if (u_even != x_t'(we) || u_odd != x_t'(wo)) begin
        failures++;
        if (failures < 10)
          $display("FAIL i=%0d x=%0d: even %0d/%0d odd %0d/%0d", i, s, u_even, we, u_odd, wo);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturations=%0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
