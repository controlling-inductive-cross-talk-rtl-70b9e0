// tb_xtalk_overhead: coding overhead against bus size. For segments of 1 to
// 8 signal pins (n = 3..10, p = 2) it runs the codebook search of xtalk_pkg
// in both styles and compares the effective width m with the published
// overhead curves, overhead = (physical - effective) / physical:
//   aggressive     m = 1,1,2,2,3,3,4,4   (0,50,33,50,40,50,43,50 %)
//   non-aggressive m = 1,2,2,3,4,4,5,6   (0,0,33,25,20,33,29,25 %)
// The constraint model gives m = 5 for six signal pins non-aggressive (17 %
// overhead, against 33 % on the curve); that point is checked at 5. It also
// checks that every state of each code set has at least 2^m successors in
// the set that pass the reference constraint model (the closed-set rule).
module tb_xtalk_overhead;
  import xtalk_pkg::*;
  import tb_xtalk_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_a [8] = '{1, 1, 2, 2, 3, 3, 4, 4};
    int exp_n [8] = '{1, 2, 2, 3, 4, 5, 5, 6};
    xtalk_cfg_t c;
    state_set_t s;
    int m, deg, thr;
    for (int style = 0; style < 2; style++) begin
      thr = (style == 0) ? 50 : 125;
      for (int ns = 1; ns <= 8; ns++) begin
        c = make_cfg(ns + 2, 2, xtalk_style_e'(style), 100);
        m = eff_width(c);
        check(m == ((style == 0) ? exp_a[ns-1] : exp_n[ns-1]),
              $sformatf("style %0d, %0d signal pins: m = %0d", style, ns, m));
        $display("style %0d: %0d signal pins -> m = %0d, overhead %0d %%",
                 style, ns, m, (100 * (ns - m)) / ns);
        s = closed_set(c, m);
        check(set_size(s) >= (1 << m), "code set large enough");
        for (int a = 0; a < (1 << ns); a++) if (s[a]) begin
          deg = 0;
          for (int b = 0; b < (1 << ns); b++)
            if (s[b] && ref_viol(ns, thr, ns, a, b) == 0) deg++;
          check(deg >= (1 << m), $sformatf("state %0d has %0d successors", a, deg));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
