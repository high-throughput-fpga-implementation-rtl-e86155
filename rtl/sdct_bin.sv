// sdct_bin -- one transform index m of the look-ahead pipelined sliding DCT.
//
// With c(n) the comb output of this bin's parity, the two recursions
//   P1(n) = beta W^m P1(n-1) + c(n)
//   P2(n) = beta W^-m P2(n-1) + W^-m c(n)
// are unrolled twice (look-ahead of degree two):
//   P1(n) = c(n) + beta W^m c(n-1) + beta^2 W^2m c(n-2) + beta^3 W^3m P1(n-3)
//   P2(n) = W^-m c(n) + beta W^-2m c(n-1) + beta^2 W^-3m c(n-2)
//           + beta^3 W^-3m P2(n-3)
// and X_m(n) = Re{ 1/2 k_m (-1)^m W^{m/2} (P1(n) + P2(n)) }, W = exp(-j pi/M).
//
// Pipeline (registers marked |), following the design's block diagram:
//   u --|a--|--|ad2        delayed copies of c for the c(n-1), c(n-2) terms
//   path 1: S1 = a + [beta W^m * a]|          |  S2 = S1 + [beta^2 W^2m * ad2]|  |
//   path 2: S1 = [W^-m * u]| + [beta W^-2m * a]| |  S2 = S1 + [beta^2 W^-3m * ad2]| |
//   each S2 feeds a critical loop (sdct_loop, Q7.8), their sum P (Q8.8) is
//   registered and scaled by sdct_out_scale (two stages).
// Every register pair encloses at most one real arithmetic operation.
//
// Interface: u is the registered comb output (Q7.7) for the bin's parity;
// x_out is X_m in Q8.8, seven clocks after the comb sample appears on u
// (eight after x(n) enters the comb). Synchronous active-low reset.
module sdct_bin
  import sdct_pkg::*;
#(
  parameter int  M    = 32,
  parameter real BETA = 0.99,
  parameter int  IDX  = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  x_t   u,
  output s_t   x_out
);
  localparam real MR = real'(IDX);

  localparam ccf_t A1 = coef(BETA,       MR,        M);
  localparam ccf_t A2 = coef(BETA**2,    2.0 * MR,  M);
  localparam ccf_t A3 = coef(BETA**3,    3.0 * MR,  M);
  localparam ccf_t B0 = coef(1.0,       -MR,        M);
  localparam ccf_t B1 = coef(BETA,      -2.0 * MR,  M);
  localparam ccf_t B2 = coef(BETA**2,   -3.0 * MR,  M);
  localparam ccf_t B3 = coef(BETA**3,   -3.0 * MR,  M);
  localparam cg_t  G  = out_coef(IDX, M);

  // Delayed copies of the comb output.
  x_t a, ad1, ad2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a   <= '0;
      ad1 <= '0;
      ad2 <= '0;
    end else begin
      a   <= u;
      ad1 <= a;
      ad2 <= ad1;
    end
  end

  // Feed-forward multipliers (one register each, before rounding).
  x_t a1_re, a1_im, a2_re, a2_im, b0_re, b0_im, b1_re, b1_im, b2_re, b2_im;

  sdct_rc_mul #(.C_RE(A1.re), .C_IM(A1.im)) u_a1 (.clk, .rst_n, .x(a),   .y_re(a1_re), .y_im(a1_im));
  sdct_rc_mul #(.C_RE(A2.re), .C_IM(A2.im)) u_a2 (.clk, .rst_n, .x(ad2), .y_re(a2_re), .y_im(a2_im));
  sdct_rc_mul #(.C_RE(B0.re), .C_IM(B0.im)) u_b0 (.clk, .rst_n, .x(u),   .y_re(b0_re), .y_im(b0_im));
  sdct_rc_mul #(.C_RE(B1.re), .C_IM(B1.im)) u_b1 (.clk, .rst_n, .x(a),   .y_re(b1_re), .y_im(b1_im));
  sdct_rc_mul #(.C_RE(B2.re), .C_IM(B2.im)) u_b2 (.clk, .rst_n, .x(ad2), .y_re(b2_re), .y_im(b2_im));

  // Saturating feed-forward adders, Q7.7.
  x_t s1a_re, s1a_im, s2a_re, s2a_im, s1b_re, s1b_im, s2b_re, s2b_im;
  x_t s1a_re_d, s1a_im_d, s1b_re_d, s1b_im_d;
  x_t s2a_re_d, s2a_im_d, s2b_re_d, s2b_im_d;
  logic [7:0] sat;

  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s1a_re (.a((X_W+1)'(a) + (X_W+1)'(a1_re)), .y(s1a_re), .sat(sat[0]));
  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s1a_im (.a((X_W+1)'(a1_im)), .y(s1a_im), .sat(sat[1]));
  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s1b_re (.a((X_W+1)'(b0_re) + (X_W+1)'(b1_re)), .y(s1b_re), .sat(sat[2]));
  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s1b_im (.a((X_W+1)'(b0_im) + (X_W+1)'(b1_im)), .y(s1b_im), .sat(sat[3]));
  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s2a_re (.a((X_W+1)'(s1a_re_d) + (X_W+1)'(a2_re)), .y(s2a_re), .sat(sat[4]));
  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s2a_im (.a((X_W+1)'(s1a_im_d) + (X_W+1)'(a2_im)), .y(s2a_im), .sat(sat[5]));
  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s2b_re (.a((X_W+1)'(s1b_re_d) + (X_W+1)'(b2_re)), .y(s2b_re), .sat(sat[6]));
  sdct_rnd_sat #(.IN_W(X_W+1), .IN_F(X_F), .OUT_W(X_W), .OUT_F(X_F))
    u_s2b_im (.a((X_W+1)'(s1b_im_d) + (X_W+1)'(b2_im)), .y(s2b_im), .sat(sat[7]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1a_re_d <= '0; s1a_im_d <= '0; s1b_re_d <= '0; s1b_im_d <= '0;
      s2a_re_d <= '0; s2a_im_d <= '0; s2b_re_d <= '0; s2b_im_d <= '0;
    end else begin
      s1a_re_d <= s1a_re; s1a_im_d <= s1a_im; s1b_re_d <= s1b_re; s1b_im_d <= s1b_im;
      s2a_re_d <= s2a_re; s2a_im_d <= s2a_im; s2b_re_d <= s2b_re; s2b_im_d <= s2b_im;
    end
  end

  // Critical loops.
  logic signed [P_W-1:0] p1_re, p1_im, p2_re, p2_im;

  sdct_loop #(.C_RE(A3.re), .C_IM(A3.im))
    u_loop1 (.clk, .rst_n, .f_re(s2a_re_d), .f_im(s2a_im_d), .p_re(p1_re), .p_im(p1_im));
  sdct_loop #(.C_RE(B3.re), .C_IM(B3.im))
    u_loop2 (.clk, .rst_n, .f_re(s2b_re_d), .f_im(s2b_im_d), .p_re(p2_re), .p_im(p2_im));

  // P = P1 + P2: Q7.8 + Q7.8 fits Q8.8 exactly.
  s_t p_re, p_im;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_re <= '0;
      p_im <= '0;
    end else begin
      p_re <= S_W'(p1_re) + S_W'(p2_re);
      p_im <= S_W'(p1_im) + S_W'(p2_im);
    end
  end

  sdct_out_scale #(.G_RE(G.re), .G_IM(G.im))
    u_out (.clk, .rst_n, .p_re, .p_im, .x(x_out));

  logic unused_sat;
  assign unused_sat = ^sat;
endmodule
