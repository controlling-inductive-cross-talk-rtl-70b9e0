// xtalk_encoder: memory-based encoder of one bus segment.
//
// Each clock the encoder takes one m-bit data word and moves the segment's
// NS signal pins to a new state. The new state is read from a table indexed
// by (current pin state, data word); every entry is a transition that meets
// the segment's supply-bounce, glitch, edge-degradation and power
// constraints and stays inside the closed codeword set S, so any data
// sequence produces only legal transitions on the pins. The table is built
// at elaboration from the constraint model in xtalk_pkg (rows for states
// outside S are never reached and hold the state itself).
//
// Interface: data_in (M bits) is sampled on every rising clk edge; sig_out
// (NS bits, bit i drives signal pin i+1 of the segment) is the registered
// pin state, so a word appears on the pins one cycle after it is sampled.
// rst_n (active low, synchronous) puts the pins in the lowest-numbered
// state of S, which the decoder also resets to. Every cycle carries a word;
// there is no idle cycle.
//
// The table-based ("memory-based") structure and the codeword-set criterion
// follow the source method; the ordering of codewords within a row, the
// reset state and the register at the output are this design's choices.
module xtalk_encoder
  import xtalk_pkg::*;
#(
  parameter xtalk_cfg_t CFG = DEFAULT_CFG,
  localparam int NS     = n_sig(CFG),
  localparam int M      = eff_width(CFG),
  localparam int NSTATE = 1 << NS,
  localparam int NWORD  = 1 << M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [M-1:0]  data_in,
  output logic [NS-1:0] sig_out
);

  localparam state_set_t CODE_SET = closed_set(CFG, M);
  localparam int         START    = start_state(CODE_SET);

  // Next-state table, one row per pin state, one column per data word.
  logic [NS-1:0] enc_rom [NSTATE][NWORD];

  for (genvar s = 0; s < NSTATE; s++) begin : g_row
    for (genvar d = 0; d < NWORD; d++) begin : g_col
      localparam int NEXT = CODE_SET[s] ? enc_next(CFG, CODE_SET, s, d) : s;
      assign enc_rom[s][d] = NS'(NEXT);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sig_out <= NS'(START);
    else        sig_out <= enc_rom[sig_out][data_in];
  end

  initial begin
    assert (CFG.reach >= 1 && CFG.reach <= 3)
      else $error("coupling reach p must be 1..3");
    assert (NS >= 1 && NS <= MAX_NS)
      else $error("signal pins per segment must be 1..%0d", MAX_NS);
    assert (M >= 1) else $error("constraints leave no usable code");
  end

endmodule
