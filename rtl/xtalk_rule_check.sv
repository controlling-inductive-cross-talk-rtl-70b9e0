// xtalk_rule_check: evaluates the 3n-3 coding constraints of one bus
// segment for the transition between two pin states.
//
// The check is purely combinational. For every signal pin it computes the
// net coupled voltage from its neighbours up to distance p (k1 from the
// nearest, k2 from the second, k3 from the third) and tests the constraint
// that applies to the pin's own transition: glitch bound when static, edge
// bound when rising or falling. Signal pins of the adjacent segments (in
// reach only when p = 3) are unknown here and counted at their worst, a
// constant margin per pin computed at elaboration. It also counts rising pins against the VDD pin's bounce bound,
// falling pins against the VSS pin's bound, and switching pins against the
// power bound. viol[r-1] is set when rule r is broken, with the rules
// numbered as in xtalk_pkg (rule 1 = VDD, rules 3i-1/3i/3i+1 = pin i
// rising/falling/static, then VSS, then power).
//
// Interface: prev_sig and next_sig are the NS signal pins (bit i = pin i+1)
// in two consecutive bus cycles; viol has 3n-3 bits; legal is high when no
// rule is broken. Voltages are integers in permille of VDD.
//
// The constraint equations are the source method's; that they are also
// available as a hardware checker (the link uses one to watch the bus) is
// this design's addition.
module xtalk_rule_check
  import xtalk_pkg::*;
#(
  parameter xtalk_cfg_t CFG = DEFAULT_CFG,
  localparam int NS = n_sig(CFG),
  localparam int NR = 3 * NS + 3
) (
  input  logic [NS-1:0] prev_sig,
  input  logic [NS-1:0] next_sig,
  output logic [NR-1:0] viol,
  output logic          legal_o
);

  localparam int HALF_Z = CFG.z / 2;

  typedef logic signed [15:0] volt_t;

  logic signed [1:0] v [NS];   // per-pin transition: +1, -1 or 0
  volt_t             unk [NS];  // worst-case coupling from other segments

  for (genvar i = 0; i < NS; i++) begin : g_unk
    assign unk[i] = volt_t'(foreign_coupling(CFG, i));
  end

  always_comb begin
    for (int i = 0; i < NS; i++)
      v[i] = 2'(signed'({1'b0, next_sig[i]}) - signed'({1'b0, prev_sig[i]}));
  end

  always_comb begin
    volt_t rise, fall, sw, coup;
    rise = '0;
    fall = '0;
    sw   = '0;
    viol = '0;
    for (int i = 0; i < NS; i++) begin
      if (v[i] == 2'sd1)  rise = rise + volt_t'(HALF_Z);
      if (v[i] == -2'sd1) fall = fall + volt_t'(HALF_Z);
      if (v[i] != 2'sd0)  sw   = sw + 16'sd1;
    end
    viol[0]      = rise > volt_t'(CFG.pbnc);
    viol[3*NS+1] = fall > volt_t'(CFG.pbnc);
    viol[3*NS+2] = sw > volt_t'(CFG.ppower);
    for (int i = 0; i < NS; i++) begin
      coup = '0;
      for (int q = 1; q <= CFG.reach; q++) begin
        if (i - q >= 0)
          coup = coup + volt_t'(k_of(CFG, q)) * volt_t'(v[i-q]);
        if (i + q < NS)
          coup = coup + volt_t'(k_of(CFG, q)) * volt_t'(v[i+q]);
      end
      viol[3*i+1] = (v[i] == 2'sd1)  && (coup - unk[i] < volt_t'(CFG.p1));
      viol[3*i+2] = (v[i] == -2'sd1) && (coup + unk[i] > volt_t'(CFG.pm1));
      viol[3*i+3] = (v[i] == 2'sd0)  &&
                    ((coup + unk[i] > volt_t'(CFG.p0)) ||
                     (coup - unk[i] < -volt_t'(CFG.p0)));
    end
  end

  assign legal_o = (viol == '0);

endmodule
