// tb_sdct_cc_mul -- checks the two-stage complex x complex-constant multiplier.
//
// Random Q7.8 complex inputs, a new one every clock. The output register is
// loaded on the second rising edge after an input is applied and must then
// equal (rr - ii, ri + ir), each product rounded to even into Q7.8 first and
// each sum clipped to Q7.8; comparing at exactly that edge checks the
// two-stage latency.
module tb_sdct_cc_mul;
  import sdct_tb_pkg::*;

  localparam logic signed [11:0] CR = 12'sd994;
  localparam logic signed [11:0] CI = -12'sd291;

  logic clk = 1'b0, rst_n;
  logic signed [14:0] ar, ai, yr, yi;

  sdct_cc_mul #(.C_RE(CR), .C_IM(CI)) dut (.clk, .rst_n, .a_re(ar), .a_im(ai), .y_re(yr), .y_im(yi));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hr [$], hi [$];

  initial begin
    rst_n = 1'b0;
    ar = '0;
    ai = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hr = '{0};
    hi = '{0};
    for (int i = 0; i < 5000; i++) begin
      longint r, m, wr, wi, xr, xi;
      if (i % 100 < 3) begin r = 16383; m = -16384; end
      else begin
        r = longint'(signed'(15'($urandom)));
        m = longint'(signed'(15'($urandom)));
      end
      ar = 15'(r);
      ai = 15'(m);
      hr.push_back(r);
      hi.push_back(m);
      @(negedge clk);
      xr = hr.pop_front();
      xi = hi.pop_front();
      wr = rnd_sat(xr * CR, 10, 15) - rnd_sat(xi * CI, 10, 15);
      wi = rnd_sat(xr * CI, 10, 15) + rnd_sat(xi * CR, 10, 15);
      if (wr != clip(wr, 15) || wi != clip(wi, 15)) n_sat++;
      wr = clip(wr, 15);
      wi = clip(wi, 15);
      checks += 2;
      if (yr != 15'(wr) || yi != 15'(wi)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d: (%0d,%0d) want (%0d,%0d)", i, yr, yi, wr, wi);
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturations=%0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
