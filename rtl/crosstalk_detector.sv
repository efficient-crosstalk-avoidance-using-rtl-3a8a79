// crosstalk_detector: flags adjacent wire pairs that switch together.
//
// The transition flags of each pair of neighbouring wires are ANDed:
// xtalk[i] = trans[i] & trans[i+1] is 1 when wires i and i+1 would both switch
// in the same cycle, which is the condition treated as crosstalk (inductive
// when both move the same way, capacitive when they move opposite ways).
// An all-zero xtalk vector means the transfer is crosstalk free; any_xtalk
// is its OR. Purely combinational.
module crosstalk_detector #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] trans,
  output logic [WIDTH-2:0] xtalk,
  output logic             any_xtalk
);

  always_comb begin
    for (int i = 0; i < WIDTH - 1; i++) begin
      xtalk[i] = trans[i] & trans[i+1];
    end
  end

  assign any_xtalk = |xtalk;

endmodule
