// sdct_rnd_sat -- convergent rounding followed by saturation.
//
// Converts a signed fixed-point value with IN_F fraction bits into a signed
// value of OUT_W bits with OUT_F fraction bits (OUT_F <= IN_F). The dropped
// fraction bits are rounded to the nearest representable value; an exact tie
// goes to the neighbour whose last kept bit is 0 (round half to even), so
// the rounding has no bias. The rounded value is then clipped to the output
// range instead of wrapping, and 'sat' flags that clipping happened.
// If the output has more integer bits than the input the value is only sign
// extended and never clips.
//
// Purely combinational; the pipeline registers are placed by the users.
// Convergent rounding and saturation are what the design specifies; the
// exact placement of this unit relative to the registers is chosen by each
// user module.
module sdct_rnd_sat #(
  parameter int IN_W  = 26,
  parameter int IN_F  = 17,
  parameter int OUT_W = 14,
  parameter int OUT_F = 7
) (
  input  logic signed [IN_W-1:0]  a,
  output logic signed [OUT_W-1:0] y,
  output logic                    sat
);
  localparam int SH = IN_F - OUT_F;      // dropped fraction bits
  localparam int RW = IN_W - SH + 1;     // width of the rounded value
  localparam int EW = (RW > OUT_W) ? RW : OUT_W;

  logic signed [RW-1:0] r;               // rounded, not yet clipped
  logic signed [EW-1:0] r_ext;

  if (SH > 0) begin : g_round
    logic signed [IN_W-SH-1:0] kept;
    logic        [SH-1:0]      frac;
    logic                      up;
    localparam logic [SH-1:0]  HALF = SH'(1) << (SH - 1);
    always_comb begin
      kept = a[IN_W-1:SH];
      frac = a[SH-1:0];
      // Above half: round up. Exactly half: round up only if 'kept' is odd.
      if (frac[SH-1] && frac != HALF) up = 1'b1;
      else if (frac == HALF)          up = kept[0];
      else                            up = 1'b0;
      r = RW'(kept) + RW'(up);
    end
  end else begin : g_noround
    assign r = RW'(a);
  end

  localparam logic signed [EW-1:0] MAX = EW'({1'b0, {(OUT_W-1){1'b1}}});
  localparam logic signed [EW-1:0] MIN = EW'(signed'({1'b1, {(OUT_W-1){1'b0}}}));

  always_comb begin
    r_ext = EW'(r);
    if (r_ext > MAX) begin
      y   = MAX[OUT_W-1:0];
      sat = 1'b1;
    end else if (r_ext < MIN) begin
      y   = MIN[OUT_W-1:0];
      sat = 1'b1;
    end else begin
      y   = r_ext[OUT_W-1:0];
      sat = 1'b0;
    end
  end

  if (OUT_F > IN_F) begin : g_bad_format
    $error("sdct_rnd_sat: OUT_F must not exceed IN_F");
  end
endmodule
