// tb_xtalk_link: end-to-end test of the encoded bus link on the example bus
// (n = 7) in four configurations: p = 2 aggressive with two segments,
// p = 2 non-aggressive, p = 2 aggressive with the power bound at 20 % of the
// maximum, and p = 3 non-aggressive with two segments. Each runs a random
// word stream with a reset in mid-stream and pin faults on the wires (see
// tb_link_harness). Besides the data and rule
// checks, every mechanism must have occurred at least once: the uncoded
// stream breaking a supply-bounce, glitch, edge-degradation and power rule
// (which the coded stream never does), static coded cycles, mid-stream
// reset, and wire faults caught by code_err and by the rule monitor.
module tb_xtalk_link;
  import xtalk_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 4;
  logic done [NH];
  int checks [NH], failures [NH];
  int rb [NH], rg [NH], re [NH], rp [NH], st [NH], ec [NH], vc [NH], rs [NH];

  tb_link_harness #(.STYLE(STYLE_AGGRESSIVE), .SEGMENTS(2)) h_ag (
    .clk, .done(done[0]), .checks(checks[0]), .failures(failures[0]),
    .n_raw_bounce(rb[0]), .n_raw_glitch(rg[0]), .n_raw_edge(re[0]), .n_raw_power(rp[0]),
    .n_static(st[0]), .n_err_caught(ec[0]), .n_viol_caught(vc[0]), .n_resets(rs[0]));
  tb_link_harness #(.STYLE(STYLE_NON_AGGRESSIVE)) h_na (
    .clk, .done(done[1]), .checks(checks[1]), .failures(failures[1]),
    .n_raw_bounce(rb[1]), .n_raw_glitch(rg[1]), .n_raw_edge(re[1]), .n_raw_power(rp[1]),
    .n_static(st[1]), .n_err_caught(ec[1]), .n_viol_caught(vc[1]), .n_resets(rs[1]));
  tb_link_harness #(.STYLE(STYLE_AGGRESSIVE), .POWER_PCT(20)) h_pw (
    .clk, .done(done[2]), .checks(checks[2]), .failures(failures[2]),
    .n_raw_bounce(rb[2]), .n_raw_glitch(rg[2]), .n_raw_edge(re[2]), .n_raw_power(rp[2]),
    .n_static(st[2]), .n_err_caught(ec[2]), .n_viol_caught(vc[2]), .n_resets(rs[2]));
  tb_link_harness #(.STYLE(STYLE_NON_AGGRESSIVE), .REACH(3), .SEGMENTS(2)) h_p3 (
    .clk, .done(done[3]), .checks(checks[3]), .failures(failures[3]),
    .n_raw_bounce(rb[3]), .n_raw_glitch(rg[3]), .n_raw_edge(re[3]), .n_raw_power(rp[3]),
    .n_static(st[3]), .n_err_caught(ec[3]), .n_viol_caught(vc[3]), .n_resets(rs[3]));

  int total_checks = 0, total_failures = 0;

  task automatic need(int count, string what);
    total_checks++;
    if (count == 0) begin
      total_failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures + 1);
    $finish;
  end

  initial begin
    // The harnesses clear done at time 0; look only after that.
    repeat (3) @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int h = 0; h < NH; h++) begin
      total_checks   += checks[h];
      total_failures += failures[h];
      $display("config %0d: raw bounce %0d glitch %0d edge %0d power %0d | static %0d | faults caught: code_err %0d monitor %0d | resets %0d",
               h, rb[h], rg[h], re[h], rp[h], st[h], ec[h], vc[h], rs[h]);
      need(rb[h], "uncoded supply bounce");
      need(rs[h], "mid-stream reset");
      need(ec[h], "wire fault caught by code_err");
      need(vc[h], "wire fault caught by rule monitor");
      need(st[h], "static coded cycle");
    end
    need(rg[0], "uncoded glitch (aggressive)");
    need(re[0], "uncoded edge degradation (aggressive)");
    need(rp[2], "uncoded power excess (20 % power bound)");
    // Effective widths of the three configurations: 3, 4 and 2 bits.
    total_checks += 3;
    if (h_ag.M != 3) begin total_failures++; $display("FAIL: aggressive width %0d", h_ag.M); end
    if (h_na.M != 4) begin total_failures++; $display("FAIL: non-aggressive width %0d", h_na.M); end
    if (h_pw.M != 2) begin total_failures++; $display("FAIL: power width %0d", h_pw.M); end
    // Reach 3 only removes transitions: at most the reach-2 width, and
    // still a usable code.
    total_checks++;
    if (h_p3.M < 1 || h_p3.M > 4) begin total_failures++; $display("FAIL: reach-3 width %0d", h_p3.M); end
    $display("reach-3 non-aggressive width %0d", h_p3.M);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
