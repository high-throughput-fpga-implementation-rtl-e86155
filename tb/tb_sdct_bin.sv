// tb_sdct_bin -- checks single bins against the floating-point recursion.
//
// Five bins (m = 0, 1, 3, 4, 7) of an M = 8 transform with beta = 0.95 are
// driven with the same random comb signal c(n) (Q7.7, Gaussian, sigma 2).
// The reference runs the original, not look-ahead, recursions in floating
// point:
//   P1(n) = beta W^m P1(n-1) + c(n),  P2(n) = beta W^-m P2(n-1) + W^-m c(n),
//   X_m(n) = Re{ 1/2 k_m (-1)^m W^{m/2} (P1(n) + P2(n)) }
// and each bin output, seven clocks after c(n), must be within TOL of it.
// An impulse first checks that the response appears after exactly seven
// clocks and not before.
module tb_sdct_bin;
  import sdct_pkg::*;
  import sdct_tb_pkg::*;

  localparam int  M    = 8;
  localparam real BETA = 0.95;
  localparam int  NB   = 5;
  localparam int  IDXS [NB] = '{0, 1, 3, 4, 7};
  localparam int  LAT  = 7;
  localparam real TOL  = 0.08;

  logic clk = 1'b0, rst_n;
  x_t   u;
  s_t   xo [NB];

  for (genvar b = 0; b < NB; b++) begin : g_dut
    sdct_bin #(.M(M), .BETA(BETA), .IDX(IDXS[b])) dut (.clk, .rst_n, .u, .x_out(xo[b]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real p1r [NB], p1i [NB], p2r [NB], p2i [NB];
  real refs [16][NB];
  real maxerr = 0.0;

  // Advance the floating-point recursions by one sample and store X_m.
  task automatic model(input real c, input int slot);
    for (int b = 0; b < NB; b++) begin
      real th, cr, ci, nr, ni, g, gr, gi, sr, si;
      th = PI * IDXS[b] / M;                  // W^m = cos th - j sin th
      cr = BETA * $cos(th);
      ci = -BETA * $sin(th);
      nr = cr * p1r[b] - ci * p1i[b] + c;
      ni = cr * p1i[b] + ci * p1r[b];
      p1r[b] = nr;
      p1i[b] = ni;
      ci = -ci;                               // beta W^-m
      nr = cr * p2r[b] - ci * p2i[b] + $cos(th) * c;
      ni = cr * p2i[b] + ci * p2r[b] + $sin(th) * c;
      p2r[b] = nr;
      p2i[b] = ni;
      g  = 0.5 * ((IDXS[b] == 0) ? 1.0 / $sqrt(2.0) : 1.0) * ((IDXS[b] % 2 == 0) ? 1.0 : -1.0);
      gr = g * $cos(th / 2.0);
      gi = -g * $sin(th / 2.0);
      sr = p1r[b] + p2r[b];
      si = p1i[b] + p2i[b];
      refs[slot][b] = gr * sr - gi * si;
    end
  endtask

  initial begin
    int first;
    rst_n = 1'b0;
    u = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin p1r[b] = 0; p1i[b] = 0; p2r[b] = 0; p2i[b] = 0; end

    // Impulse: c = 1.0 once.
    u = 14'sd128;
    @(negedge clk);
    u = '0;
    first = -1;
    for (int k = 1; k < 12; k++) begin
      if (first < 0 && xo[1] != '0) first = k;
      @(negedge clk);
    end
    checks++;
    if (first != LAT) begin
      failures++;
      $display("FAIL: impulse response after %0d clocks", first);
    end

    // Random stream.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin p1r[b] = 0; p1i[b] = 0; p2r[b] = 0; p2i[b] = 0; end
    for (int k = 0; k < 3000 + LAT; k++) begin
      if (k < 3000) begin
        x_t s;
        s = x_t'(clip(round_even(gauss(2.0) * 128.0), X_W));
        u = s;
        model(real'(s) / 128.0, k % 16);
      end else begin
        u = '0;
        model(0.0, k % 16);
      end
      @(negedge clk);
      if (k + 1 >= LAT) begin
        for (int b = 0; b < NB; b++) begin
          real e;
          e = real'(xo[b]) / 256.0 - refs[(k + 1 - LAT) % 16][b];
          e = (e < 0.0) ? -e : e;
          if (e > maxerr) maxerr = e;
          checks++;
          if (e > TOL) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d bin %0d: got %f want %f", k, IDXS[b],
                                        real'(xo[b]) / 256.0, refs[(k + 1 - LAT) % 16][b]);
          end
        end
      end
    end
    $display("max error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
