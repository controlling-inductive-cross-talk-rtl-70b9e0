// tb_xtalk_encoder: checks the encoder on the example bus (n = 7, p = 2)
// in both coding styles, driven with random words.
//  - effective width: 3 bits aggressive, 4 bits non-aggressive
//    (overheads 40 % and 20 % for five signal pins);
//  - reset puts the pins in state 00001 (aggressive) / 00000
//    (non-aggressive), and a word appears on the pins one cycle later;
//  - every transition on the pins passes the reference constraint model;
//  - aggressive pins never reach 00000 or 11111, which have too few legal
//    successors to carry 3-bit words;
//  - from any state, different words give different next states, so the
//    code can be decoded (checked over all (state, word) pairs seen);
//  - word d sent from state s gives the d-th legal successor of s inside
//    the code set, counted upwards (aggressive set: weights 1..4;
//    non-aggressive set: all 32 states). Every (state, word) pair the code
//    can reach from reset is exercised.
module tb_xtalk_encoder;
  import xtalk_pkg::*;
  import tb_xtalk_ref_pkg::*;

  localparam xtalk_cfg_t CN = make_cfg(7, 2, STYLE_NON_AGGRESSIVE, 100);
  localparam int         CYCLES = 100000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] a_data;
  logic [3:0] n_data;
  logic [4:0] a_sig, n_sig_q;

  xtalk_encoder            u_a (.clk, .rst_n, .data_in(a_data), .sig_out(a_sig));
  xtalk_encoder #(.CFG(CN)) u_n (.clk, .rst_n, .data_in(n_data), .sig_out(n_sig_q));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // seen_x[state][word] = next state + 1 (0 = not seen)
  function automatic int ref_next(int thr, int s, int d);
    int n = 0;
    for (int t = 0; t < 32; t++) begin
      if (thr == 50 && (t == 0 || t == 31)) continue;
      if (ref_viol(5, thr, 5, s, t) == 0) begin
        if (n == d) return t;
        n++;
      end
    end
    return -1;
  endfunction

  // Number of states the reference code can reach from the reset state.
  function automatic int reachable(int thr, int start, int nw);
    bit r [32];
    bit grew = 1;
    int n = 0;
    foreach (r[i]) r[i] = 0;
    r[start] = 1;
    while (grew) begin
      grew = 0;
      for (int s = 0; s < 32; s++)
        if (r[s])
          for (int d = 0; d < nw; d++)
            if (!r[ref_next(thr, s, d)]) begin
              r[ref_next(thr, s, d)] = 1;
              grew = 1;
            end
    end
    foreach (r[i]) n += r[i];
    return n;
  endfunction

  int seen_a [32][8];
  int seen_n [32][16];
  int pairs_a, pairs_n;

  initial begin
    logic [4:0] pa, pn;
    logic [2:0] da;
    logic [3:0] dn;
    check($bits(a_data) == 3 && u_a.M == 3, "aggressive effective width 3");
    check(u_n.M == 4, "non-aggressive effective width 4");
    foreach (seen_a[s, d]) seen_a[s][d] = 0;
    foreach (seen_n[s, d]) seen_n[s][d] = 0;
    a_data = '0; n_data = '0;
    repeat (3) @(posedge clk);
    #1;
    check(a_sig == 5'b00001, $sformatf("aggressive reset state %b", a_sig));
    check(n_sig_q == 5'b00000, $sformatf("non-aggressive reset state %b", n_sig_q));
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      // Prefer a word not yet sent from the current state.
      da = 3'($urandom); dn = 4'($urandom);
      if ($urandom_range(1, 0) == 1) begin
        for (int d = 0; d < 8; d++)  if (seen_a[a_sig][d] == 0)   da = 3'(d);
        for (int d = 0; d < 16; d++) if (seen_n[n_sig_q][d] == 0) dn = 4'(d);
      end
      a_data = da; n_data = dn;
      pa = a_sig; pn = n_sig_q;
      @(posedge clk);
      #1;
      check(ref_viol(5, 50, 5, pa, a_sig) == 0,
            $sformatf("aggressive illegal %b->%b", pa, a_sig));
      check(ref_viol(5, 125, 5, pn, n_sig_q) == 0,
            $sformatf("non-aggressive illegal %b->%b", pn, n_sig_q));
      check(a_sig != 5'b00000 && a_sig != 5'b11111,
            $sformatf("aggressive left the code set: %b", a_sig));
      check(int'(a_sig) == ref_next(50, pa, da),
            $sformatf("aggressive %b word %0d -> %b", pa, da, a_sig));
      check(int'(n_sig_q) == ref_next(125, pn, dn),
            $sformatf("non-aggressive %b word %0d -> %b", pn, dn, n_sig_q));
      if (seen_a[pa][da] == 0) seen_a[pa][da] = int'(a_sig) + 1;
      else check(seen_a[pa][da] == int'(a_sig) + 1, "aggressive not a function");
      if (seen_n[pn][dn] == 0) seen_n[pn][dn] = int'(n_sig_q) + 1;
      else check(seen_n[pn][dn] == int'(n_sig_q) + 1, "non-aggressive not a function");
    end
    // Different words from one state must lead to different states.
    pairs_a = 0; pairs_n = 0;
    for (int s = 0; s < 32; s++) begin
      for (int d = 0; d < 8; d++) if (seen_a[s][d] != 0) begin
        pairs_a++;
        for (int e = d + 1; e < 8; e++)
          if (seen_a[s][e] != 0)
            check(seen_a[s][d] != seen_a[s][e], $sformatf("aggressive collision in state %0d", s));
      end
      for (int d = 0; d < 16; d++) if (seen_n[s][d] != 0) begin
        pairs_n++;
        for (int e = d + 1; e < 16; e++)
          if (seen_n[s][e] != 0)
            check(seen_n[s][d] != seen_n[s][e], $sformatf("non-aggressive collision in state %0d", s));
      end
    end
    // Aggressive code set: all 30 states of weight 1..4, 8 words each.
    check(pairs_a == reachable(50, 1, 8) * 8,
          $sformatf("aggressive (state, word) pairs seen: %0d", pairs_a));
    check(pairs_n == reachable(125, 0, 16) * 16,
          $sformatf("non-aggressive (state, word) pairs seen: %0d", pairs_n));
    $display("pairs seen: aggressive %0d, non-aggressive %0d", pairs_a, pairs_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
