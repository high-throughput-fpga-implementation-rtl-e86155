// sdct_cc_mul -- complex value times a constant complex coefficient, two
// pipeline stages.
//
// (a_re + j a_im)(c_re + j c_im): stage 1 registers the four real products at
// full precision; stage 2 rounds each product (convergent rounding,
// saturation) to the output format, forms re = ar*cr - ai*ci and
// im = ar*ci + ai*cr with one saturating adder each, and registers the
// result. So exactly one real operation lies between two registers, and the
// format between the real multipliers and the adders equals the output
// format, as the design specifies. Latency: two clocks from a to y.
// It is the multiplier of the critical loops (beta^3 W^{+-3m}); its two
// registers are two of the three delays of each loop.
module sdct_cc_mul #(
  parameter int IN_W  = 15,
  parameter int IN_F  = 8,
  parameter int C_W   = 12,
  parameter int C_F   = 10,
  parameter int OUT_W = 15,
  parameter int OUT_F = 8,
  parameter logic signed [C_W-1:0] C_RE = 12'sd1024,
  parameter logic signed [C_W-1:0] C_IM = 12'sd0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  a_re,
  input  logic signed [IN_W-1:0]  a_im,
  output logic signed [OUT_W-1:0] y_re,
  output logic signed [OUT_W-1:0] y_im
);
  localparam int PW = IN_W + C_W;

  logic signed [PW-1:0]    rr_q, ii_q, ri_q, ir_q;   // stage-1 products
  logic signed [OUT_W-1:0] rr, ii, ri, ir;           // rounded products
  logic signed [OUT_W-1:0] sum_re, sum_im;
  logic [5:0]              sat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_q <= '0;
      ii_q <= '0;
      ri_q <= '0;
      ir_q <= '0;
    end else begin
      rr_q <= PW'(a_re) * PW'(C_RE);
      ii_q <= PW'(a_im) * PW'(C_IM);
      ri_q <= PW'(a_re) * PW'(C_IM);
      ir_q <= PW'(a_im) * PW'(C_RE);
    end
  end

  sdct_rnd_sat #(.IN_W(PW), .IN_F(IN_F+C_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_rnd_rr (.a(rr_q), .y(rr), .sat(sat[0]));
  sdct_rnd_sat #(.IN_W(PW), .IN_F(IN_F+C_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_rnd_ii (.a(ii_q), .y(ii), .sat(sat[1]));
  sdct_rnd_sat #(.IN_W(PW), .IN_F(IN_F+C_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_rnd_ri (.a(ri_q), .y(ri), .sat(sat[2]));
  sdct_rnd_sat #(.IN_W(PW), .IN_F(IN_F+C_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_rnd_ir (.a(ir_q), .y(ir), .sat(sat[3]));

  sdct_rnd_sat #(.IN_W(OUT_W+1), .IN_F(OUT_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_sat_re (.a((OUT_W+1)'(rr) - (OUT_W+1)'(ii)), .y(sum_re), .sat(sat[4]));
  sdct_rnd_sat #(.IN_W(OUT_W+1), .IN_F(OUT_F), .OUT_W(OUT_W), .OUT_F(OUT_F))
    u_sat_im (.a((OUT_W+1)'(ri) + (OUT_W+1)'(ir)), .y(sum_im), .sat(sat[5]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else begin
      y_re <= sum_re;
      y_im <= sum_im;
    end
  end

  logic unused_sat;
  assign unused_sat = ^sat;
endmodule
