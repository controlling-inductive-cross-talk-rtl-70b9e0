// xtalk_pkg: constraint model and codebook construction for inductive
// cross-talk / power avoiding bus CODECs.
//
// A bus segment has n physical pins: pin 0 is VDD, pin n-1 is VSS and pins
// 1..n-2 carry signals (n-2 signal pins, NS below). One bus cycle moves the
// segment from one signal-pin state to the next; every signal pin then
// undergoes a transition v = +1 (rising), -1 (falling) or 0 (static).
// A transition is legal when it meets every one of the 3n-3 constraints:
//   rule 1            VDD pin : (z/2) * #rising               <= P_bnc
//   rule 3i-1         pin i rising : sum_q k_q * v(neighbours) >= P_1
//   rule 3i           pin i falling: sum_q k_q * v(neighbours) <= P_-1
//   rule 3i+1         pin i static : |sum_q k_q * v(neighbours)| <= P_0
//   rule 3(n-2)+2     VSS pin : (z/2) * #falling              <= P_bnc
//   rule 3(n-2)+3     segment : #switching pins               <= P_power
// where the neighbours of pin i are the pins at distance 1..p on both sides
// (p = coupling reach, k_q the coupled voltage from the q-th neighbour),
// counted modulo n into the adjacent segments. Supply pins never switch.
// With p <= 2 only supply pins of the adjacent segments are in reach, so a
// segment's constraints depend on that segment alone. With p = 3 the outer
// signal pins also couple to a signal pin of the adjacent segment, whose
// transition the segment's own CODEC cannot know: it is taken at its worst,
// i.e. its k_q is added to the magnitude that the bound must tolerate.
//
// The legal transitions form a digraph over the 2^NS states. An m-bit word
// can be sent per cycle iff a closed set S of states exists with |S| >= 2^m
// in which every state has >= 2^m legal out-edges (self-edge included) into
// S. closed_set() finds the largest such S by a fixpoint: repeatedly drop
// states with too few out-edges into the remaining set. The codebook maps
// data word d sent from state s to the d-th (ascending) legal successor of s
// inside S; the decoder inverts this with the previous received state.
//
// The constraint equations, the rule numbering, the supply-pin placement
// and the closed-set criterion follow the source method. Its thresholds
// (5 % of VDD aggressive, 12.5 % non-aggressive, power 20 % of maximum) are
// used as given. Voltages are integers in permille of VDD; the coupled
// voltages k1 = 5 %, k2 = 2.5 %, k3 = 1.2 % and z = 10 % of VDD, the
// worst-case treatment of adjacent-segment signal pins and the treatment of the
// edge bound as "a neighbour may hinder a switching pin by at most the same
// threshold" (P_1 = -thr, P_-1 = +thr) are this design's choice, made so
// that the aggressive rule-violation table and the overhead curves of the
// method are reproduced.
package xtalk_pkg;

  // Largest number of signal pins per segment the generators support.
  localparam int unsigned MAX_NS     = 8;
  localparam int unsigned MAX_STATES = 1 << MAX_NS;
  localparam int unsigned MAX_RULES  = 3 * MAX_NS + 3;

  typedef logic [MAX_STATES-1:0] state_set_t;
  typedef logic [MAX_RULES-1:0]  rule_vec_t;

  typedef enum logic [1:0] {
    STYLE_AGGRESSIVE     = 2'd0,  // all bounds 5 % of VDD
    STYLE_NON_AGGRESSIVE = 2'd1   // all bounds 12.5 % of VDD
  } xtalk_style_e;

  // One segment's electrical model and coding constraints (permille of VDD).
  typedef struct packed {
    int n_pins;   // n: physical pins per segment, incl. VDD and VSS
    int reach;    // p: how many neighbours on each side couple (1..3)
    int k1;       // coupled voltage from the nearest neighbour
    int k2;       // coupled voltage from the second neighbour
    int k3;       // coupled voltage from the third neighbour
    int z;        // |L di/dt| of one switching pin
    int p0;       // glitch bound on a static pin
    int p1;       // lower bound of coupling on a rising pin
    int pm1;      // upper bound of coupling on a falling pin
    int pbnc;     // supply bounce bound
    int ppower;   // most signal pins allowed to switch in one cycle
  } xtalk_cfg_t;

  // Build a configuration from the bus geometry and the coding style.
  function automatic xtalk_cfg_t make_cfg(int n_pins, int reach,
                                          xtalk_style_e style, int power_pct);
    xtalk_cfg_t c;
    int thr;
    thr      = (style == STYLE_AGGRESSIVE) ? 50 : 125;
    c.n_pins = n_pins;
    c.reach  = reach;
    c.k1     = 50;
    c.k2     = 25;
    c.k3     = 12;
    c.z      = 100;
    c.p0     = thr;
    c.p1     = -thr;
    c.pm1    = thr;
    c.pbnc   = thr;
    c.ppower = (power_pct * (n_pins - 2)) / 100;
    return c;
  endfunction

  // The example bus: n = 7 (5 signal pins), p = 2, aggressive, no power cap.
  localparam xtalk_cfg_t DEFAULT_CFG = make_cfg(7, 2, STYLE_AGGRESSIVE, 100);

  function automatic int n_sig(xtalk_cfg_t c);
    return c.n_pins - 2;
  endfunction


  // Transition of signal pin idx (0-based, pin idx+1 of the segment):
  // +1 rising, -1 falling, 0 static.
  function automatic int pin_v(int s, int t, int idx);
    return ((t >> idx) & 1) - ((s >> idx) & 1);
  endfunction

  function automatic int k_of(xtalk_cfg_t c, int q);
    return (q == 1) ? c.k1 : (q == 2) ? c.k2 : c.k3;
  endfunction

  // Coupling a signal pin (0-based index idx) may receive from signal pins
  // of the adjacent segments, taken at its worst (all of them against it).
  function automatic int foreign_coupling(xtalk_cfg_t c, int idx);
    int x, unk;
    unk = 0;
    for (int q = 1; q <= c.reach; q++) begin
      for (int dir = -1; dir <= 1; dir += 2) begin
        x = idx + 1 + dir * q;                // physical position in segment j
        if (x < 0 || x > c.n_pins - 1) begin  // lies in segment j-1 or j+1
          x = (x < 0) ? x + c.n_pins : x - c.n_pins;
          if (x >= 1 && x <= c.n_pins - 2) unk += k_of(c, q);
        end
      end
    end
    return unk;
  endfunction

  // Violated constraints of the transition s -> t; bit r-1 set = rule r.
  function automatic rule_vec_t rule_viol(xtalk_cfg_t c, int s, int t);
    rule_vec_t viol;
    int ns, rise, fall, coup, unk, v, j;
    viol = '0;
    ns   = n_sig(c);
    rise = 0;
    fall = 0;
    for (int i = 0; i < ns; i++) begin
      v = pin_v(s, t, i);
      if (v > 0) rise++;
      if (v < 0) fall++;
    end
    if ((c.z / 2) * rise > c.pbnc) viol[0] = 1'b1;
    if ((c.z / 2) * fall > c.pbnc) viol[3*ns+1] = 1'b1;
    if (rise + fall > c.ppower)    viol[3*ns+2] = 1'b1;
    for (int i = 0; i < ns; i++) begin
      coup = 0;
      for (int q = 1; q <= c.reach; q++) begin
        j = i - q;
        if (j >= 0) coup += k_of(c, q) * pin_v(s, t, j);
        j = i + q;
        if (j < ns) coup += k_of(c, q) * pin_v(s, t, j);
      end
      unk = (c.reach >= 3) ? foreign_coupling(c, i) : 0;
      v   = pin_v(s, t, i);
      if (v > 0 && coup - unk < c.p1)                          viol[3*i+1] = 1'b1;
      if (v < 0 && coup + unk > c.pm1)                         viol[3*i+2] = 1'b1;
      if (v == 0 && (coup + unk > c.p0 || coup - unk < -c.p0)) viol[3*i+3] = 1'b1;
    end
    return viol;
  endfunction

  function automatic bit legal(xtalk_cfg_t c, int s, int t);
    return rule_viol(c, s, t) == '0;
  endfunction

  // Largest closed set in which every state has >= 2^m out-edges into it.
  function automatic state_set_t closed_set(xtalk_cfg_t c, int m);
    state_set_t set;
    bit changed;
    int nst, deg;
    nst = 1 << n_sig(c);
    set = '0;
    for (int s = 0; s < nst; s++) set[s] = 1'b1;
    changed = 1'b1;
    while (changed) begin
      changed = 1'b0;
      for (int s = 0; s < nst; s++) begin
        if (set[s]) begin
          deg = 0;
          for (int t = 0; t < nst; t++)
            if (set[t] && legal(c, s, t)) deg++;
          if (deg < (1 << m)) begin
            set[s]  = 1'b0;
            changed = 1'b1;
          end
        end
      end
    end
    return set;
  endfunction

  function automatic int set_size(state_set_t set);
    int n;
    n = 0;
    for (int s = 0; s < MAX_STATES; s++) if (set[s]) n++;
    return n;
  endfunction

  // Effective bus width m: the widest word the segment can carry per cycle.
  function automatic int eff_width(xtalk_cfg_t c);
    for (int m = n_sig(c); m >= 1; m--)
      if (set_size(closed_set(c, m)) >= (1 << m)) return m;
    return 0;
  endfunction

  // Reset state of encoder and decoder: the lowest-numbered state of S.
  function automatic int start_state(state_set_t set);
    for (int s = 0; s < MAX_STATES; s++) if (set[s]) return s;
    return 0;
  endfunction

  // Encoder table entry: the d-th legal successor of s inside S.
  function automatic int enc_next(xtalk_cfg_t c, state_set_t set, int s, int d);
    int n;
    n = 0;
    for (int t = 0; t < (1 << n_sig(c)); t++) begin
      if (set[t] && legal(c, s, t)) begin
        if (n == d) return t;
        n++;
      end
    end
    return s;
  endfunction

  // Decoder table entry: the word whose code moves s to t, or -1 if t is
  // not a codeword successor of s.
  function automatic int dec_word(xtalk_cfg_t c, state_set_t set, int m,
                                  int s, int t);
    int n;
    if (!set[s] || !set[t] || !legal(c, s, t)) return -1;
    n = 0;
    for (int u = 0; u < t; u++)
      if (set[u] && legal(c, s, u)) n++;
    return (n < (1 << m)) ? n : -1;
  endfunction

endpackage
