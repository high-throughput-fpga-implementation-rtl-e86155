// tb_sdct_loop -- checks the three-delay critical loop bit for bit.
//
// The reference is a cycle model written from the recursion:
//   P[k+1] = clip( 2 F[k] + K * P[k-2] )   (K * P rounded as in the multiplier)
// i.e. P(n) = K P(n-3) + F(n) with the state visible one clock after F.
// K = beta^3 W^{3m} for M = 32, m = 5, beta = 0.99 in Q2.10. Random inputs,
// plus a burst of full-scale inputs that must make the state saturate.
module tb_sdct_loop;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;

  localparam ccf_t K = coef(0.99 ** 3, 15.0, 32);

  logic clk = 1'b0, rst_n;
  x_t   f_re, f_im;
  logic signed [14:0] p_re, p_im;

  sdct_loop #(.C_RE(K.re), .C_IM(K.im)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint pr [3], pi [3];   // model state: P[k], P[k-1], P[k-2]

  initial begin
    rst_n = 1'b0;
    f_re = '0;
    f_im = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pr = '{0, 0, 0};
    pi = '{0, 0, 0};
    for (int i = 0; i < 5000; i++) begin
      longint fr, fi, kr, ki, nr, ni;
      if (i % 1000 >= 500 && i % 1000 < 530) begin fr = 8191; fi = -8192; end
      else begin
        fr = longint'(signed'(11'($urandom)));
        fi = longint'(signed'(11'($urandom)));
      end
      f_re = x_t'(fr);
      f_im = x_t'(fi);
      kr = clip(rnd_sat(pr[2] * K.re, 10, 15) - rnd_sat(pi[2] * K.im, 10, 15), 15);
      ki = clip(rnd_sat(pr[2] * K.im, 10, 15) + rnd_sat(pi[2] * K.re, 10, 15), 15);
      nr = clip(2 * fr + kr, 15);
      ni = clip(2 * fi + ki, 15);
      if (nr != 2 * fr + kr || ni != 2 * fi + ki) n_sat++;
      pr[2] = pr[1];
      pr[1] = pr[0];
      pr[0] = nr;
      pi[2] = pi[1];
      pi[1] = pi[0];
      pi[0] = ni;
      @(negedge clk);
      checks += 2;
      if (p_re != 15'(nr) || p_im != 15'(ni)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d: (%0d,%0d) want (%0d,%0d)", i, p_re, p_im, nr, ni);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturations=%0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
