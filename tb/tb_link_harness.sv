// tb_link_harness: drives one xtalk_link configuration end to end and
// counts what happened. Random words enter every segment each cycle; the
// transmitted pins go back into the receiver through a wire model that, on
// request, flips one pin of segment 0 for one cycle. Checks:
//  - every transmitted transition meets all constraints of the reference
//    model (bounce, glitch, edge degradation, power);
//  - rx_data equals tx_data two cycles earlier, except for the two words
//    that a wire fault touches;
//  - rx_viol equals the reference rule mask of each received transition.
// Counters record how often the uncoded words would have broken each kind
// of constraint had they been put on the pins directly (the problems the
// code removes), how often the code kept the bus static, and how often
// a wire fault was caught by code_err and by the rule monitor.
module tb_link_harness
  import xtalk_pkg::*;
  import tb_xtalk_ref_pkg::*;
#(
  parameter xtalk_style_e STYLE     = STYLE_AGGRESSIVE,
  parameter int           POWER_PCT = 100,
  parameter int           SEGMENTS  = 1,
  parameter int           REACH     = 2,
  parameter int           WORDS     = 4000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_raw_bounce,    // uncoded words that break a supply-bounce rule
  output int   n_raw_glitch,    // ... a glitch rule
  output int   n_raw_edge,      // ... an edge-degradation rule
  output int   n_raw_power,     // ... the power rule
  output int   n_static,        // coded cycles in which no pin switched
  output int   n_err_caught,    // wire faults flagged by code_err
  output int   n_viol_caught,   // wire faults flagged by the rule monitor
  output int   n_resets         // resets in mid-stream
);
  localparam xtalk_cfg_t CFG = make_cfg(7, REACH, STYLE, POWER_PCT);
  localparam int NS  = 5;
  localparam int M   = eff_width(CFG);
  localparam int NR  = 18;
  localparam int THR = (STYLE == STYLE_AGGRESSIVE) ? 50 : 125;
  localparam int PPW = POWER_PCT * NS / 100;

  logic          rst_n;
  logic [M-1:0]  tx_data [SEGMENTS];
  logic [NS-1:0] tx_sig  [SEGMENTS];
  logic [NS-1:0] rx_sig  [SEGMENTS];
  logic [M-1:0]  rx_data [SEGMENTS];
  logic [SEGMENTS-1:0] rx_code_err;
  logic [NR-1:0] rx_viol [SEGMENTS];
  logic [NS-1:0] flip;

  xtalk_link #(.SEGMENTS(SEGMENTS), .REACH(REACH), .STYLE(STYLE), .POWER_PCT(POWER_PCT)) dut (
    .clk, .rst_n, .tx_data, .tx_sig, .rx_sig, .rx_data, .rx_code_err, .rx_viol
  );

  // Package and board wiring: straight through, with an optional pin flip.
  always_comb begin
    for (int g = 0; g < SEGMENTS; g++) rx_sig[g] = tx_sig[g];
    rx_sig[0] = tx_sig[0] ^ flip;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (style %0d, power %0d%%): %s", STYLE, POWER_PCT, what);
    end
  endtask

  // Bounce rules: 1 and 17; power rule 18; glitch rules 3i+1; edge 3i-1, 3i.
  localparam logic [17:0] BOUNCE = 18'b01_0000_0000_0000_0001;
  localparam logic [17:0] POWER  = 18'b10_0000_0000_0000_0000;
  localparam logic [17:0] GLITCH = 18'b00_0100_1001_0010_0100 << 1;

  initial begin
    logic [M-1:0]  hist [SEGMENTS][3];
    logic [NS-1:0] prev_tx [SEGMENTS];
    logic [NS-1:0] prev_rx;
    logic [4:0]    raw, raw_prev;
    longint unsigned m;
    int fault_age, valid_age;
    done = 0; checks = 0; failures = 0;
    n_raw_bounce = 0; n_raw_glitch = 0; n_raw_edge = 0; n_raw_power = 0;
    n_static = 0; n_err_caught = 0; n_viol_caught = 0; n_resets = 0;
    flip = '0;
    rst_n = 0;
    raw_prev = '0;
    for (int g = 0; g < SEGMENTS; g++) tx_data[g] = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    fault_age = 99;
    valid_age = 0;
    for (int g = 0; g < SEGMENTS; g++) prev_tx[g] = tx_sig[g];
    prev_rx = rx_sig[0];
    for (int c = 0; c < WORDS; c++) begin
      if (c == WORDS / 2) begin
        rst_n = 0;
        @(posedge clk);
        #1;
        rst_n = 1;
        n_resets++;
        valid_age = 0;
        for (int g = 0; g < SEGMENTS; g++) prev_tx[g] = tx_sig[g];
        prev_rx = rx_sig[0];
      end
      // New words; the raw word is the data as five uncoded pins would carry it.
      raw = 5'($urandom);
      for (int g = 0; g < SEGMENTS; g++) tx_data[g] = M'($urandom);
      tx_data[0] = M'(raw);
      m = ref_viol_p(NS, THR, PPW, raw_prev, raw, REACH);
      if ((m & BOUNCE) != 0) n_raw_bounce++;
      if ((m & GLITCH) != 0) n_raw_glitch++;
      if ((m & ~(BOUNCE | GLITCH | POWER)) != 0) n_raw_edge++;
      if ((m & POWER) != 0) n_raw_power++;
      raw_prev = raw;
      // One pin fault every 97 cycles on segment 0.
      flip = ((c % 97) == 50) ? NS'(1) << $urandom_range(NS - 1, 0) : '0;
      if (flip != 0) fault_age = 0; else fault_age++;
      #1;
      // Monitor sees prev_rx -> rx_sig[0] this cycle.
      check(rx_viol[0] == NR'(ref_viol_p(NS, THR, PPW, prev_rx, rx_sig[0], REACH)),
            $sformatf("rule monitor %b->%b", prev_rx, rx_sig[0]));
      if (flip != 0 && rx_viol[0] != 0) n_viol_caught++;
      prev_rx = rx_sig[0];
      for (int g = 0; g < SEGMENTS; g++) begin
        hist[g][2] = hist[g][1];
        hist[g][1] = hist[g][0];
        hist[g][0] = tx_data[g];
      end
      @(posedge clk);
      #1;
      valid_age++;
      for (int g = 0; g < SEGMENTS; g++) begin
        check(ref_viol_p(NS, THR, PPW, prev_tx[g], tx_sig[g], REACH) == 0,
              $sformatf("segment %0d illegal transition %b->%b", g, prev_tx[g], tx_sig[g]));
        if (g == 0 && prev_tx[g] == tx_sig[g]) n_static++;
        prev_tx[g] = tx_sig[g];
        // rx_data now holds the word sent two edges ago.
        if (valid_age >= 2 && !(g == 0 && (fault_age == 0 || fault_age == 1)))
          check(rx_data[g] == hist[g][1],
                $sformatf("segment %0d received %0h expected %0h", g, rx_data[g], hist[g][1]));
        if (valid_age >= 2 && !(g == 0 && (fault_age == 0 || fault_age == 1)))
          check(!rx_code_err[g], $sformatf("segment %0d false code error", g));
      end
      if (fault_age == 0 && rx_code_err[0]) n_err_caught++;
    end
    done = 1;
  end
endmodule
