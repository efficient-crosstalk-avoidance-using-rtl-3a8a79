// mrfc_decoder: receiver-side conversion of a 4-bit MRFC word to data.
//
// The value of a Modified Redundant Fibonacci word is the sum of the weights
// of its set bits, weights 3,2,1,1 from the most significant wire down:
// data = 3*d3 + 2*d2 + d1 + d0. Every one of the 16 possible words gives a
// value from 0 to 7, so the decoder also accepts the equivalent (redundant)
// forms of a value, e.g. 0101 and 0110 both decode to 3. The weights come
// from the MRFC code table; building the decoder as this weighted sum is this
// design's choice. Purely combinational.
//
// A word whose bits were flipped by the crosstalk avoidance step generally
// decodes to a different value than the data word it was made from.
module mrfc_decoder
  import mrfc_pkg::*;
(
  input  code_t code,
  output data_t data
);

  always_comb begin
    int unsigned sum;
    sum = 0;
    for (int i = 0; i < CODE_W; i++) begin
      if (code[i]) sum += MRFC_WEIGHT[i];
    end
    data = data_t'(sum);
  end

endmodule
