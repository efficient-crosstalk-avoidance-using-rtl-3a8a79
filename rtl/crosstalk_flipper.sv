// crosstalk_flipper: removes adjacent simultaneous transitions by bit flipping.
//
// The next code word is checked against the word now on the wires with a
// transition detector (XOR) and a crosstalk detector (AND of neighbouring
// XOR outputs). For every adjacent pair flagged as crosstalk, both bits of the
// pair are flipped in the next word, so neither wire of that pair switches.
// The corrected word is checked again and flipped again, and so on, until the
// crosstalk detector reports all zeros. Checking, flipping and re-checking
// until no crosstalk is left follows the CODEC's published flow; the loop is
// unrolled here into PASSES combinational detect-and-flip stages followed by
// one final check that drives `clean`.
//
// Flipping both bits of every flagged pair leaves only isolated transitions,
// so one pass already clears all crosstalk; the extra passes (PASSES defaults
// to WIDTH-1, the number of wire pairs, an assumed bound) keep the loop
// structure and cost only logic that synthesis removes as redundant.
//
// Interface: all combinational. flip_mask = next_word ^ out_word shows which
// bits were changed; clean is 1 when out_word has no adjacent pair switching
// together relative to prev_word.
module crosstalk_flipper #(
  parameter int unsigned WIDTH  = 4,
  parameter int unsigned PASSES = WIDTH - 1
) (
  input  logic [WIDTH-1:0] prev_word,
  input  logic [WIDTH-1:0] next_word,
  output logic [WIDTH-1:0] out_word,
  output logic [WIDTH-1:0] flip_mask,
  output logic             clean
);

  // word[p] is the candidate word entering pass p.
  logic [WIDTH-1:0] word [PASSES+1];

  assign word[0] = next_word;

  for (genvar p = 0; p < PASSES; p++) begin : g_pass
    logic [WIDTH-1:0] trans;
    logic [WIDTH-2:0] xtalk;
    logic             any_xtalk;
    logic [WIDTH-1:0] mask;

    transition_detector #(.WIDTH(WIDTH)) u_trans (
      .prev_word (prev_word),
      .next_word (word[p]),
      .trans     (trans)
    );

    crosstalk_detector #(.WIDTH(WIDTH)) u_xtalk (
      .trans     (trans),
      .xtalk     (xtalk),
      .any_xtalk (any_xtalk)
    );

    // Bit i is flipped when it belongs to a flagged pair on either side.
    always_comb begin
      for (int i = 0; i < WIDTH; i++) begin
        mask[i] = ((i < WIDTH - 1) && xtalk[i < WIDTH - 1 ? i : 0])
               || ((i > 0)         && xtalk[i > 0 ? i - 1 : 0]);
      end
    end

    assign word[p+1] = any_xtalk ? (word[p] ^ mask) : word[p];
  end

  // Final check of the corrected word.
  logic [WIDTH-1:0] trans_final;
  logic [WIDTH-2:0] xtalk_final;

  transition_detector #(.WIDTH(WIDTH)) u_trans_final (
    .prev_word (prev_word),
    .next_word (word[PASSES]),
    .trans     (trans_final)
  );

  crosstalk_detector #(.WIDTH(WIDTH)) u_xtalk_final (
    .trans     (trans_final),
    .xtalk     (xtalk_final),
    .any_xtalk ()
  );

  assign out_word  = word[PASSES];
  assign flip_mask = next_word ^ word[PASSES];
  assign clean     = (xtalk_final == '0);

endmodule
