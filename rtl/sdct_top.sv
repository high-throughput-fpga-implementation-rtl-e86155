// sdct_top -- M-point sliding DCT-II with look-ahead pipelining.
//
// For every new sample x(n) the design outputs all M coefficients of the
// DCT-II of the last M samples,
//   X_m(n) = k_m sum_{i=n-M+1..n} beta^{n-i} x(i) cos(m (i-n+M-1/2) pi / M),
// k_0 = 1/sqrt(2), k_m = 1 otherwise. Instead of recomputing the transform,
// each bin runs a recursion in which the sample leaving the window is
// cancelled by a comb; beta < 1 pulls the recursion poles inside the unit
// circle so round-off cannot make it unstable (with beta = 1 it is the exact
// DCT). The recursion is unrolled twice (look-ahead of degree two), so its
// loop holds three registers and the whole datapath is cut into eight
// pipeline stages with no more than one real operation per stage.
//
// Structure: one sdct_comb computes the comb term for the even and for the
// odd bins; M sdct_bin instances (m = 0..M-1) each take the comb output of
// their parity.
//
// Interface: one sample x_in (Q7.7) per clock, uninterrupted; x_out[m]
// (Q8.8) holds X_m of the sample that entered LATENCY = 8 clocks earlier.
// in_valid is only delayed to out_valid to mark that latency; the window is
// considered filled with zeros after reset. The handshake, the reset and the
// defaults M = 32 and beta = 0.99 are this implementation's choices; the
// structure, pipeline and number formats follow the design.
module sdct_top
  import sdct_pkg::*;
#(
  parameter int  M    = 32,
  parameter real BETA = 0.99
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  x_t   x_in,
  output logic out_valid,
  output s_t   x_out [M]
);
  x_t u_even, u_odd;

  sdct_comb #(.M(M), .BETA(BETA))
    u_comb (.clk, .rst_n, .x(x_in), .u_even, .u_odd);

  for (genvar m = 0; m < M; m++) begin : g_bin
    sdct_bin #(.M(M), .BETA(BETA), .IDX(m))
      u_bin (.clk, .rst_n, .u((m % 2 == 0) ? u_even : u_odd), .x_out(x_out[m]));
  end

  logic [LATENCY-1:0] vld;

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  assign out_valid = vld[LATENCY-1];
endmodule
