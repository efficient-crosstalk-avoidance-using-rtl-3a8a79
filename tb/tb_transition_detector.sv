// tb_transition_detector: exhaustive check of the per-wire XOR transition
// detector at WIDTH = 4 (all 256 pairs of words). The expected flag for each
// wire is worked out bit by bit from "did this wire change value".
module tb_transition_detector;
  localparam int W = 4;
  logic [W-1:0] prev_word, next_word, trans;
  int checks = 0, failures = 0;

  transition_detector #(.WIDTH(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**W; a++) begin
      for (int b = 0; b < 2**W; b++) begin
        prev_word = W'(a);
        next_word = W'(b);
        #1;
        for (int i = 0; i < W; i++) begin
          logic exp_bit;
          exp_bit = (((a >> i) & 1) != ((b >> i) & 1));
          checks++;
          if (trans[i] !== exp_bit) begin
            failures++;
            $display("FAIL prev=%b next=%b wire %0d trans=%b", prev_word, next_word, i, trans[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
