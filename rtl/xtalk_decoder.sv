// xtalk_decoder: memory-based decoder of one bus segment.
//
// The decoder recovers the data word from the transition seen on the
// segment's signal pins: a table indexed by (previous pin state, current
// pin state) gives the word whose code moves the first to the second. It is
// the inverse of xtalk_encoder's table, built at elaboration from the same
// constraint model, so encoder and decoder need only share the
// configuration. A pair that is not a codeword transition (a pin error, or
// the two ends out of step) is flagged on code_err.
//
// Interface: sig_in (NS bits, bit i = signal pin i+1) is sampled on every
// rising clk edge. data_out and code_err are registered and describe the
// transition from the previously sampled state to the one just sampled, so
// they appear one cycle after the pin state. rst_n (active low,
// synchronous) sets the remembered state to the encoder's reset state;
// data_out reads 0 until the first word. After a code error the decoder
// simply continues from the state it received.
//
// The table-based structure follows the source method; error flagging and
// reset behaviour are this design's choices.
module xtalk_decoder
  import xtalk_pkg::*;
#(
  parameter xtalk_cfg_t CFG = DEFAULT_CFG,
  localparam int NS     = n_sig(CFG),
  localparam int M      = eff_width(CFG),
  localparam int NSTATE = 1 << NS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] sig_in,
  output logic [M-1:0]  data_out,
  output logic          code_err
);

  localparam state_set_t CODE_SET = closed_set(CFG, M);
  localparam int         START    = start_state(CODE_SET);

  // One entry per (previous, current) state: valid flag and data word.
  typedef struct packed {
    logic         valid;
    logic [M-1:0] word;
  } dec_entry_t;

  dec_entry_t    dec_rom [NSTATE][NSTATE];
  logic [NS-1:0] prev_q;

  for (genvar s = 0; s < NSTATE; s++) begin : g_row
    for (genvar t = 0; t < NSTATE; t++) begin : g_col
      localparam int WORD = dec_word(CFG, CODE_SET, M, s, t);
      assign dec_rom[s][t] = (WORD < 0) ? '0 : {1'b1, M'(WORD)};
    end
  end

  dec_entry_t entry;
  assign entry = dec_rom[prev_q][sig_in];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_q   <= NS'(START);
      data_out <= '0;
      code_err <= 1'b0;
    end else begin
      prev_q   <= sig_in;
      data_out <= entry.word;
      code_err <= !entry.valid;
    end
  end

endmodule
