// sdct_rc_mul -- real sample times a constant complex coefficient.
//
// Used for the feed-forward multipliers of the look-ahead paths
// (W^-m, beta W^m, beta W^-2m, beta^2 W^2m, beta^2 W^-3m). The two real
// products are registered at full precision and the convergent rounding and
// saturation to the output format follow the register, so the register sits
// where the words are widest and the rounding shares the next stage with an
// adder. Latency: one clock from x to y.
//
// Parameters give the input, coefficient and output formats (defaults
// Q7.7 x Q2.10 -> Q7.7, as on the block diagram) and the coefficient value.
// Placing the register in front of the rounding follows the design's
// description of its retiming; the reset value 0 is this implementation's
// choice.
module sdct_rc_mul #(
  parameter int IN_W  = 14,
  parameter int IN_F  = 7,
  parameter int C_W   = 12,
  parameter int C_F   = 10,
  parameter int OUT_W = 14,
  parameter int OUT_F = 7,
  parameter logic signed [C_W-1:0] C_RE = 12'sd724,    // default: W^{M/4} of M = 32 ...
  parameter logic signed [C_W-1:0] C_IM = -12'sd724    // ... = (1 - j)/sqrt(2) in Q2.10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y_re,
  output logic signed [OUT_W-1:0] y_im
);
  localparam int PW = IN_W + C_W;

  logic signed [PW-1:0] pr_q, pi_q;
  logic                 sat_r, sat_i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pr_q <= '0;
      pi_q <= '0;
    end else begin
      pr_q <= PW'(x) * PW'(C_RE);
      pi_q <= PW'(x) * PW'(C_IM);
    end
  end

  sdct_rnd_sat #(.IN_W(PW), .IN_F(IN_F+C_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_rnd_re (.a(pr_q), .y(y_re), .sat(sat_r));
  sdct_rnd_sat #(.IN_W(PW), .IN_F(IN_F+C_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_rnd_im (.a(pi_q), .y(y_im), .sat(sat_i));

  logic unused_sat;
  assign unused_sat = sat_r ^ sat_i;
endmodule
