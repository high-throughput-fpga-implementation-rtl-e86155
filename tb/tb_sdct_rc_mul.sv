// tb_sdct_rc_mul -- checks the real x complex-constant multiplier.
//
// Three instances with different coefficients (one near -2, so products
// clip) get random Q7.7 samples; one clock later each output must equal
// the exact product rounded to even and clipped to Q7.7.
module tb_sdct_rc_mul;
  import sdct_tb_pkg::*;

  logic clk = 1'b0, rst_n;
  logic signed [13:0] x;
  logic signed [13:0] yr [3], yi [3];

  localparam logic signed [11:0] CR [3] = '{12'sd724, -12'sd1001, -12'sd2048};
  localparam logic signed [11:0] CI [3] = '{-12'sd724, 12'sd333, 12'sd1};

  for (genvar g = 0; g < 3; g++) begin : g_dut
    sdct_rc_mul #(.C_RE(CR[g]), .C_IM(CI[g])) dut (.clk, .rst_n, .x, .y_re(yr[g]), .y_im(yi[g]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      longint s;
      s = (i < 4) ? ((i % 2 == 0) ? 8191 : -8192) : longint'(signed'(14'($urandom)));
      x = 14'(s);
      @(negedge clk);
      for (int g = 0; g < 3; g++) begin
        longint wr, wi;
        wr = rnd_sat(s * CR[g], 10, 14);
        wi = rnd_sat(s * CI[g], 10, 14);
        if (wr != round_even(real'(s * CR[g]) / 1024.0)) n_sat++;
        checks += 2;
        if (yr[g] != 14'(wr) || yi[g] != 14'(wi)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d coef %0d: (%0d,%0d) want (%0d,%0d)", s, g, yr[g], yi[g], wr, wi);
        end
      end
    end
    checks++;
    if (n_sat == 0) failures++;
    $display("saturations=%0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
