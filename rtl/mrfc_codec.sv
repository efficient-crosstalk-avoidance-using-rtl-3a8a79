// mrfc_codec: MRFC crosstalk-avoidance CODEC for a 4-wire on-chip bus.
//
// Adjacent bus wires that switch in the same cycle couple into each other:
// capacitively when they switch in opposite directions and inductively when
// they switch in the same direction. This CODEC sends each 3-bit data word as
// a 4-bit Modified Redundant Fibonacci Code (MRFC) word and, before driving
// it, compares it with the word already on the wires. Wherever two
// neighbouring wires would both switch, both bits of that pair are flipped in
// the outgoing word so that neither wire moves. The corrected word becomes the
// new reference for the next word, so each word is checked against what was
// actually driven.
//
// Datapath (one word per clock):
//   in_data --> mrfc_encoder (register + table) --> code
//   code, bus --> crosstalk_flipper (XOR transition detector, AND crosstalk
//                 detector, flip, re-check) --> bus register
//   bus --> mrfc_decoder --> rx_data (receiver side)
//
// Timing: a word sampled with in_valid at edge k is in the encoder register
// after edge k and on `bus` (with bus_valid, flip_mask, xtalk_seen and
// bus_clean describing it) after edge k+1. Without in_valid the bus holds
// its value, so idle cycles cause no transitions. Synchronous active-high
// reset clears the bus to 0000.
//
// What follows the published design: the MRFC table, the XOR/AND detectors,
// flipping the flagged bits of the next word and re-checking until the
// detector output is all zeros, and comparing each new word with the
// previously driven (flipped) one. This design's own choices: the valid
// signal, the reset value, the register placement and the status outputs.
// The published scheme sends no side information about flips, so rx_data
// equals the sent data only for words that were not flipped (flip_mask == 0).
module mrfc_codec
  import mrfc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  data_t in_data,
  output code_t bus,
  output logic  bus_valid,
  output code_t flip_mask,
  output logic  xtalk_seen,
  output logic  bus_clean,
  output data_t rx_data
);

  logic  code_valid;
  code_t code;
  code_t fixed_word;
  code_t fixed_mask;
  logic  fixed_clean;

  mrfc_encoder u_enc (
    .clk        (clk),
    .rst        (rst),
    .in_valid   (in_valid),
    .in_data    (in_data),
    .code_valid (code_valid),
    .code       (code)
  );

  crosstalk_flipper #(.WIDTH(CODE_W)) u_flip (
    .prev_word (bus),
    .next_word (code),
    .out_word  (fixed_word),
    .flip_mask (fixed_mask),
    .clean     (fixed_clean)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      bus        <= '0;
      bus_valid  <= 1'b0;
      flip_mask  <= '0;
      xtalk_seen <= 1'b0;
      bus_clean  <= 1'b1;
    end else begin
      bus_valid <= code_valid;
      if (code_valid) begin
        bus        <= fixed_word;
        flip_mask  <= fixed_mask;
        xtalk_seen <= |fixed_mask;
        bus_clean  <= fixed_clean;
      end
    end
  end

  mrfc_decoder u_dec (
    .code (bus),
    .data (rx_data)
  );

  // The detect-and-flip loop must always end crosstalk free.
  a_clean : assert property (@(posedge clk) disable iff (rst) code_valid |-> fixed_clean)
    else $error("crosstalk left on the bus after flipping");

endmodule
