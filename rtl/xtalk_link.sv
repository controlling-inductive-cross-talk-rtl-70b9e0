// xtalk_link: an encoded off-chip bus link, transmitter and receiver logic.
//
// The bus is made of SEGMENTS identical segments of n pins each (VDD, n-2
// signal pins, VSS). Each segment has its own encoder on the transmitting
// chip and its own decoder on the receiving chip; with coupling reach
// p <= 2 only supply pins of the neighbouring segments lie within reach, so
// segments are coded independently (with p = 3 each segment's code allows
// for the worst its neighbours can do, see xtalk_pkg). Per segment and per clock, an m-bit
// word enters tx_data, the encoder drives the n-2 signal pins (tx_sig) with
// a transition that meets the supply-bounce, glitch, edge-degradation and
// power constraints, and the decoder turns the received pins (rx_sig) back
// into the word. The package and board wiring between tx_sig and rx_sig,
// and the supply pins, are not logic and sit outside this module: connect
// tx_sig to rx_sig (possibly through a delay or a fault model).
//
// On the receiving side a rule checker watches every received transition
// and reports which of the 3n-3 constraints it breaks (rx_viol); it stays
// zero on a clean link and shows what an error on the wires did.
//
// Timing: a word on tx_data at clock edge k appears on tx_sig after edge k
// and, with tx_sig wired straight to rx_sig, on rx_data (with rx_code_err)
// after edge k+1: a latency of two cycles, one word per cycle per segment.
// rst_n is active low and synchronous, and must be applied to both ends
// together.
//
// Segmentation, the coding constraints and the CODEC structure follow the
// source method; the segment count default (one segment, the example bus),
// the checker and the port arrangement are this design's choices.
module xtalk_link
  import xtalk_pkg::*;
#(
  parameter int           SEGMENTS  = 1,
  parameter int           N_PINS    = 7,
  parameter int           REACH     = 2,
  parameter xtalk_style_e STYLE     = STYLE_AGGRESSIVE,
  parameter int           POWER_PCT = 100,
  localparam xtalk_cfg_t  CFG       = make_cfg(N_PINS, REACH, STYLE, POWER_PCT),
  localparam int          NS        = n_sig(CFG),
  localparam int          M         = eff_width(CFG),
  localparam int          NR        = 3 * N_PINS - 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // transmitting chip
  input  logic [M-1:0]        tx_data     [SEGMENTS],
  output logic [NS-1:0]       tx_sig      [SEGMENTS],
  // receiving chip
  input  logic [NS-1:0]       rx_sig      [SEGMENTS],
  output logic [M-1:0]        rx_data     [SEGMENTS],
  output logic [SEGMENTS-1:0] rx_code_err,
  output logic [NR-1:0]       rx_viol     [SEGMENTS]
);

  for (genvar g = 0; g < SEGMENTS; g++) begin : g_seg
    logic [NS-1:0] rx_prev;
    logic          unused_legal;

    xtalk_encoder #(.CFG(CFG)) u_enc (
      .clk     (clk),
      .rst_n   (rst_n),
      .data_in (tx_data[g]),
      .sig_out (tx_sig[g])
    );

    xtalk_decoder #(.CFG(CFG)) u_dec (
      .clk      (clk),
      .rst_n    (rst_n),
      .sig_in   (rx_sig[g]),
      .data_out (rx_data[g]),
      .code_err (rx_code_err[g])
    );

    // Last received pin state, for the checker.
    always_ff @(posedge clk) begin
      if (!rst_n) rx_prev <= NS'(start_state(closed_set(CFG, M)));
      else        rx_prev <= rx_sig[g];
    end

    xtalk_rule_check #(.CFG(CFG)) u_chk (
      .prev_sig (rx_prev),
      .next_sig (rx_sig[g]),
      .viol     (rx_viol[g]),
      .legal_o  (unused_legal)
    );
  end

endmodule
