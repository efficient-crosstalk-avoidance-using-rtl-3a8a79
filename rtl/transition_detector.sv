// transition_detector: marks which wires switch between two code words.
//
// Each bit of the word now on the wires is XORed with the same bit of the
// word to be sent next; a 1 in trans[i] means wire i would switch (0->1 or
// 1->0). This bit-by-bit XOR is the detector the CODEC is built around. The
// detector is purely combinational: the two words it compares are held in
// registers outside it (the encoder output register and the bus register).
module transition_detector #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] prev_word,
  input  logic [WIDTH-1:0] next_word,
  output logic [WIDTH-1:0] trans
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      trans[i] = prev_word[i] ^ next_word[i];
    end
  end

endmodule
