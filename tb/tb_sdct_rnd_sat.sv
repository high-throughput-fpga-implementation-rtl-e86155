// tb_sdct_rnd_sat -- checks convergent rounding and saturation.
//
// Two instances: the default Q9.17 -> Q7.7 reduction (10 bits dropped, 2
// integer bits clipped) and a Q8.8 -> Q7.7 reduction with one dropped bit,
// where every odd input is an exact tie. Inputs are random plus directed
// ties and extremes; the reference rounds real numbers (ties to even) and
// clips. Ties and saturations must both have been exercised.
module tb_sdct_rnd_sat;
  import sdct_tb_pkg::*;

  logic signed [25:0] a1;
  logic signed [13:0] y1;
  logic               s1;
  logic signed [15:0] a2;
  logic signed [13:0] y2;
  logic               s2;

  sdct_rnd_sat #(.IN_W(26), .IN_F(17), .OUT_W(14), .OUT_F(7)) dut1 (.a(a1), .y(y1), .sat(s1));
  sdct_rnd_sat #(.IN_W(16), .IN_F(8),  .OUT_W(14), .OUT_F(7)) dut2 (.a(a2), .y(y2), .sat(s2));

  int checks = 0, failures = 0;
  int n_tie = 0, n_sat = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check1(input logic signed [25:0] v);
    longint want, r;
    a1 = v;
    #1;
    r    = round_even(real'(v) / 1024.0);
    want = clip(r, 14);
    checks += 2;
    if (y1 != 14'(want) || s1 != (want != r)) begin
      failures++;
      $display("FAIL 26->14: a=%0d y=%0d sat=%0b want %0d", v, y1, s1, want);
    end
    if (v[9:0] == 10'h200) n_tie++;
    if (want != r) n_sat++;
  endtask

  task automatic check2(input logic signed [15:0] v);
    longint want, r;
    a2 = v;
    #1;
    r    = round_even(real'(v) / 2.0);
    want = clip(r, 14);
    checks += 2;
    if (y2 != 14'(want) || s2 != (want != r)) begin
      failures++;
      $display("FAIL 16->14: a=%0d y=%0d sat=%0b want %0d", v, y2, s2, want);
    end
    if (v[0]) n_tie++;
    if (want != r) n_sat++;
  endtask

  initial begin
    // Directed ties: x.5 rounds to the even neighbour.
    check1(26'sd512);           // 0.5  -> 0
    check1(26'sd1536);          // 1.5  -> 2
    check1(-26'sd512);          // -0.5 -> 0
    check1(-26'sd1536);         // -1.5 -> -2
    check1(26'sd513);           // just above half -> 1
    check1(26'sh1ffffff);       // max -> clip
    check1(-26'sh2000000);      // min -> clip
    check2(16'sd3);             // 1.5 -> 2
    check2(16'sd5);             // 2.5 -> 2
    check2(16'sh7fff);          // clip high
    check2(-16'sh8000);         // clip low
    for (int i = 0; i < 20000; i++) begin
      check1(26'($urandom));
      check1(26'(signed'(20'($urandom))));
      check1({16'($urandom), 10'h200});
      check2(16'($urandom));
    end
    $display("ties=%0d saturations=%0d", n_tie, n_sat);
    checks++;
    if (n_tie == 0 || n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
