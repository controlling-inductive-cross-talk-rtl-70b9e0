// tb_xtalk_rule_check: checks the constraint checker.
//  1. n = 5 (three signal pins), p = 2, aggressive: for every pair of pin
//     states, the set of eliminated transitions and the bounce and glitch
//     rules they break must equal the published rule-violation table
//     (14 transitions: every one with two or more pins switching the same
//     way). Its edge-degradation entries for 111 and -1-1-1 are not
//     compared: with one-sided edge bounds all neighbours switching the same
//     way aid the edge.
//  2. The same bus non-aggressive: only 111 and -1-1-1 are eliminated.
//  3. n = 7, p = 2, aggressive with the power bound at 20 %: every pair of
//     states against the reference model.
//  4. n = 7, p = 3, non-aggressive: every pair of states against the
//     reference model, where the outer signal pins also see a signal pin of
//     each adjacent segment, taken at its worst.
module tb_xtalk_rule_check;
  import xtalk_pkg::*;
  import tb_xtalk_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_elim_a = 0, n_elim_r = 0;

  localparam xtalk_cfg_t CA = make_cfg(5, 2, STYLE_AGGRESSIVE, 100);
  localparam xtalk_cfg_t CN = make_cfg(5, 2, STYLE_NON_AGGRESSIVE, 100);
  localparam xtalk_cfg_t CP = make_cfg(7, 2, STYLE_AGGRESSIVE, 20);
  localparam xtalk_cfg_t C3 = make_cfg(7, 3, STYLE_NON_AGGRESSIVE, 100);

  logic [2:0]  a_prev, a_next, n_prev, n_next;
  logic [11:0] a_viol, n_viol;
  logic        a_legal, n_legal;
  logic [4:0]  p_prev, p_next;
  logic [17:0] p_viol;
  logic        p_legal;
  logic [4:0]  r_prev, r_next;
  logic [17:0] r_viol;
  logic        r_legal;

  xtalk_rule_check #(.CFG(CA)) u_a (.prev_sig(a_prev), .next_sig(a_next), .viol(a_viol), .legal_o(a_legal));
  xtalk_rule_check #(.CFG(CN)) u_n (.prev_sig(n_prev), .next_sig(n_next), .viol(n_viol), .legal_o(n_legal));
  xtalk_rule_check #(.CFG(CP)) u_p (.prev_sig(p_prev), .next_sig(p_next), .viol(p_viol), .legal_o(p_legal));
  xtalk_rule_check #(.CFG(C3)) u_r (.prev_sig(r_prev), .next_sig(r_next), .viol(r_viol), .legal_o(r_legal));

  // Published table: transition (v1 v2 v3) and the rules it breaks.
  typedef struct { int v1, v2, v3; int rules[$]; } row_t;
  row_t tbl[$];

  function automatic int key(int v1, int v2, int v3);
    return (v1 + 1) * 9 + (v2 + 1) * 3 + (v3 + 1);
  endfunction

  function automatic logic [11:0] mask_of(int rules[$]);
    logic [11:0] m = '0;
    foreach (rules[i]) m[rules[i]-1] = 1'b1;
    return m;
  endfunction

  task automatic add(int v1, int v2, int v3, int rules[$]);
    row_t r;
    r.v1 = v1; r.v2 = v2; r.v3 = v3; r.rules = rules;
    tbl.push_back(r);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp_a [27];
    bit          elim_a [27];
    logic [11:0] edge_rules;
    int k, v1, v2, v3;

    add( 0,  1,  1, '{1, 4});
    add( 0, -1, -1, '{4, 11});
    add( 1,  0,  1, '{1, 7});
    add( 1,  1,  0, '{1, 10});
    add( 1,  1,  1, '{1, 2, 5, 8});
    add( 1,  1, -1, '{1});
    add( 1, -1,  1, '{1});
    add( 1, -1, -1, '{11});
    add(-1,  0, -1, '{7, 11});
    add(-1,  1,  1, '{1});
    add(-1,  1, -1, '{11});
    add(-1, -1,  0, '{10, 11});
    add(-1, -1,  1, '{11});
    add(-1, -1, -1, '{3, 6, 9, 11});
    // edge-degradation rules 2,3,5,6,8,9
    edge_rules = mask_of('{2, 3, 5, 6, 8, 9});
    for (int i = 0; i < 27; i++) begin exp_a[i] = '0; elim_a[i] = 0; end
    foreach (tbl[i]) begin
      k = key(tbl[i].v1, tbl[i].v2, tbl[i].v3);
      exp_a[k]  = mask_of(tbl[i].rules);
      elim_a[k] = 1;
    end

    for (int s = 0; s < 8; s++) begin
      for (int t = 0; t < 8; t++) begin
        a_prev = 3'(s); a_next = 3'(t);
        n_prev = 3'(s); n_next = 3'(t);
        #1;
        v1 = int'(t[0]) - int'(s[0]);
        v2 = int'(t[1]) - int'(s[1]);
        v3 = int'(t[2]) - int'(s[2]);
        k  = key(v1, v2, v3);
        check(a_legal == !elim_a[k],
              $sformatf("aggressive %b->%b legal=%0b", 3'(s), 3'(t), a_legal));
        check((a_viol & ~edge_rules) == (exp_a[k] & ~edge_rules),
              $sformatf("aggressive %b->%b rules %b expected %b", 3'(s), 3'(t),
                        a_viol, exp_a[k]));
        if (!a_legal) n_elim_a++;
        check(n_legal == !((v1 == v2) && (v2 == v3) && (v1 != 0)),
              $sformatf("non-aggressive %b->%b legal=%0b", 3'(s), 3'(t), n_legal));
      end
    end
    // 14 of 27 transitions eliminated; count over all 64 state pairs.
    check(tbl.size() == 14, "table size");

    for (int s = 0; s < 32; s++) begin
      for (int t = 0; t < 32; t++) begin
        p_prev = 5'(s); p_next = 5'(t);
        #1;
        check(p_viol == 18'(ref_viol(5, 50, 1, s, t)),
              $sformatf("n=7 power 20%% %b->%b rules %b expected %b", 5'(s), 5'(t),
                        p_viol, 18'(ref_viol(5, 50, 1, s, t))));
        check(p_legal == (popcount(s ^ t) <= 1),
              $sformatf("n=7 power 20%% %b->%b legal", 5'(s), 5'(t)));
      end
    end

    for (int s = 0; s < 32; s++) begin
      for (int t = 0; t < 32; t++) begin
        r_prev = 5'(s); r_next = 5'(t);
        #1;
        check(r_viol == 18'(ref_viol_p(5, 125, 5, s, t, 3)),
              $sformatf("n=7 p=3 %b->%b rules %b expected %b", 5'(s), 5'(t),
                        r_viol, 18'(ref_viol_p(5, 125, 5, s, t, 3))));
        if (!r_legal) n_elim_r++;
      end
    end
    $display("n=7 p=3 non-aggressive: %0d of 1024 state pairs eliminated", n_elim_r);
    $display("aggressive: %0d of 64 state pairs eliminated", n_elim_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
