// sdct_loop -- critical loop of the look-ahead recursion.
//
// Computes P(n) = K P(n-3) + F(n), with K = beta^3 W^{3m} (path 1) or
// beta^3 W^{-3m} (path 2). After the look-ahead transformation of degree two
// the loop holds three delays: the register after the loop adder and the two
// pipeline registers of the complex multiplier (sdct_cc_mul). Each of the
// three loop stages has one real operation, so the loop no longer limits
// the clock rate more than the feed-forward stages.
//
// Interface: f (Q7.7 complex) is F(n); p (Q7.8 complex) is the register after
// the adder and holds P(n-1). Adder and multiplier saturate to Q7.8. The loop
// starts from zero after reset. Formats and delay placement follow the
// design's block diagram; the elaboration-time check that |K| < 1 is an
// addition of this implementation.
module sdct_loop
  import sdct_pkg::*;
#(
  parameter cf_t C_RE = 12'sd0,
  parameter cf_t C_IM = 12'sd0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  x_t                    f_re,
  input  x_t                    f_im,
  output logic signed [P_W-1:0] p_re,
  output logic signed [P_W-1:0] p_im
);
  logic signed [P_W-1:0] fb_re, fb_im;   // K * P(n-3)
  logic signed [P_W-1:0] s_re, s_im;
  logic                  sat_re, sat_im;

  sdct_cc_mul #(.IN_W(P_W), .IN_F(P_F), .C_W(CF_W), .C_F(CF_F),
                .OUT_W(P_W), .OUT_F(P_F), .C_RE(C_RE), .C_IM(C_IM))
    u_mul (.clk, .rst_n, .a_re(p_re), .a_im(p_im), .y_re(fb_re), .y_im(fb_im));

  // F is Q7.7: one more fraction bit aligns it with Q7.8.
  sdct_rnd_sat #(.IN_W(P_W+2), .IN_F(P_F), .OUT_W(P_W), .OUT_F(P_F))
    u_sat_re (.a({{2{f_re[X_W-1]}}, f_re, 1'b0} + (P_W+2)'(fb_re)), .y(s_re), .sat(sat_re));
  sdct_rnd_sat #(.IN_W(P_W+2), .IN_F(P_F), .OUT_W(P_W), .OUT_F(P_F))
    u_sat_im (.a({{2{f_im[X_W-1]}}, f_im, 1'b0} + (P_W+2)'(fb_im)), .y(s_im), .sat(sat_im));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_re <= '0;
      p_im <= '0;
    end else begin
      p_re <= s_re;
      p_im <= s_im;
    end
  end

  logic unused_sat;
  assign unused_sat = sat_re ^ sat_im;

  // The quantised loop coefficient is the loop's pole (cubed): it must lie
  // strictly inside the unit circle or the recursion is unstable.
  localparam longint K2 = longint'(C_RE) * longint'(C_RE) + longint'(C_IM) * longint'(C_IM);
  if (K2 >= (longint'(1) <<< (2 * CF_F))) begin : g_unstable
    $error("sdct_loop: |K| >= 1, the recursion would be unstable");
  end
endmodule
