// sdct_out_scale -- output scaling X_m = Re{ G * P }, G = 1/2 k_m (-1)^m W^{m/2}.
//
// P = P1 + P2 (Q8.8 complex) is multiplied by the constant G (Q1.11). X_m is
// real, so only the real part Re{G P} = pr*gr - pi*gi is built: the two real
// products are registered at full precision, then rounded convergently to
// Q8.8, subtracted with saturation and registered. Latency: two clocks.
// Dropping the imaginary part is this implementation's simplification: it is
// zero in exact arithmetic and the design's output is the real X_m.
module sdct_out_scale
  import sdct_pkg::*;
#(
  parameter g_t G_RE = 12'sd1024,
  parameter g_t G_IM = 12'sd0
) (
  input  logic clk,
  input  logic rst_n,
  input  s_t   p_re,
  input  s_t   p_im,
  output s_t   x
);
  localparam int PW = S_W + G_W;

  logic signed [PW-1:0] rr_q, ii_q;
  s_t                   rr, ii, d;
  logic [2:0]           sat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_q <= '0;
      ii_q <= '0;
    end else begin
      rr_q <= PW'(p_re) * PW'(G_RE);
      ii_q <= PW'(p_im) * PW'(G_IM);
    end
  end

  sdct_rnd_sat #(.IN_W(PW), .IN_F(S_F+G_F), .OUT_W(S_W), .OUT_F(S_F))
    u_rnd_rr (.a(rr_q), .y(rr), .sat(sat[0]));
  sdct_rnd_sat #(.IN_W(PW), .IN_F(S_F+G_F), .OUT_W(S_W), .OUT_F(S_F))
    u_rnd_ii (.a(ii_q), .y(ii), .sat(sat[1]));
  sdct_rnd_sat #(.IN_W(S_W+1), .IN_F(S_F), .OUT_W(S_W), .OUT_F(S_F))
    u_sat (.a((S_W+1)'(rr) - (S_W+1)'(ii)), .y(d), .sat(sat[2]));

  always_ff @(posedge clk) begin
    if (!rst_n) x <= '0;
    else        x <= d;
  end

  logic unused_sat;
  assign unused_sat = ^sat;
endmodule
