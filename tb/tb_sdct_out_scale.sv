// tb_sdct_out_scale -- checks X = Re{G P} of the output scaling stage.
//
// Uses the coefficient of bin m = 3 for M = 32 (-1/2 W^{3/2}, Q1.11) and
// random Q8.8 inputs. The output register is loaded on the second clock
// after the input is applied and must equal
// clip(round(pr*gr) - round(pi*gi)), with rounding to even into Q8.8.
module tb_sdct_out_scale;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;

  localparam cg_t G = out_coef(3, 32);

  logic clk = 1'b0, rst_n;
  s_t   p_re, p_im, x;

  sdct_out_scale #(.G_RE(G.re), .G_IM(G.im)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint hr [$], hi [$];

  initial begin
    rst_n = 1'b0;
    p_re = '0;
    p_im = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    hr = '{0};
    hi = '{0};
    for (int i = 0; i < 5000; i++) begin
      longint r, m, w, xr, xi;
      r = longint'(signed'(16'($urandom)));
      m = longint'(signed'(16'($urandom)));
      p_re = s_t'(r);
      p_im = s_t'(m);
      hr.push_back(r);
      hi.push_back(m);
      @(negedge clk);
      xr = hr.pop_front();
      xi = hi.pop_front();
      w  = clip(rnd_sat(xr * G.re, 11, 16) - rnd_sat(xi * G.im, 11, 16), 16);
      checks++;
      if (x != s_t'(w)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d: %0d want %0d", i, x, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
