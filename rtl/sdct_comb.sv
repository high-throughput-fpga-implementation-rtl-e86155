// sdct_comb -- shared input comb of the sliding DCT.
//
// Every bin m needs c_m(n) = x(n) - beta^M (-1)^m x(n-M). The expression only
// depends on whether m is even or odd, so it is computed once for each group:
//   u_even = x(n) - beta^M x(n-M)
//   u_odd  = x(n) + beta^M x(n-M)
// As in the design's block diagram, x(n) is multiplied by beta^M (Q1.7) and
// rounded to Q7.7 before it enters the M-deep delay line, so one delay line
// serves both groups. The two adders saturate to Q7.7 and are followed by one
// pipeline register (the first of the eight pipeline stages).
//
// Interface: one sample x (Q7.7) per clock; u_even / u_odd hold the comb
// output of the sample presented one clock earlier. Synchronous active-low
// reset clears the delay line (zero history before the first sample).
// Using one delay line and a sign choice for the two groups is this
// implementation's reading of the sharing described for the design.
module sdct_comb
  import sdct_pkg::*;
#(
  parameter int  M    = 32,
  parameter real BETA = 0.99
) (
  input  logic clk,
  input  logic rst_n,
  input  x_t   x,
  output x_t   u_even,
  output x_t   u_odd
);
  localparam bm_t BM = beta_m(BETA, M);

  logic signed [X_W+BM_W-1:0] prod;
  x_t                         v;          // beta^M x(n), Q7.7
  x_t                         dly [M];    // z^-M delay line
  x_t                         ce, co;
  logic                       sat_v, sat_e, sat_o;

  assign prod = x * BM;

  sdct_rnd_sat #(.IN_W(X_W+BM_W), .IN_F(X_F+BM_F), .OUT_W(X_W), .OUT_F(X_F))
    u_rnd_v (.a(prod), .y(v), .sat(sat_v));

  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_sat_e (.a((X_W+1)'(x) - (X_W+1)'(dly[M-1])), .y(ce), .sat(sat_e));

  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_sat_o (.a((X_W+1)'(x) + (X_W+1)'(dly[M-1])), .y(co), .sat(sat_o));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) dly[i] <= '0;
      u_even <= '0;
      u_odd  <= '0;
    end else begin
      dly[0] <= v;
      for (int i = 1; i < M; i++) dly[i] <= dly[i-1];
      u_even <= ce;
      u_odd  <= co;
    end
  end

  // The saturation flags are not brought out; clipping is silent by design.
  logic unused_sat;
  assign unused_sat = sat_v ^ sat_e ^ sat_o;
endmodule
