// tb_crosstalk_flipper: exhaustive check (all 256 word pairs, WIDTH = 4) of
// the detect-and-flip step. The reference walks the wires from LSB to MSB,
// finds every run of two or more neighbouring wires that would switch and
// cancels the switching of each wire in such a run; lone switching wires are
// left alone. It also checks the published example 0111 -> 1100, which must be
// sent as 1111.
module tb_crosstalk_flipper;
  localparam int W = 4;
  logic [W-1:0] prev_word, next_word, out_word, flip_mask;
  logic         clean;
  int checks = 0, failures = 0;
  int flipped_words = 0, multi_pair = 0;

  crosstalk_flipper #(.WIDTH(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_out(logic [W-1:0] p, logic [W-1:0] n);
    logic [W-1:0] sw, res;
    int i, j;
    sw  = p ^ n;
    res = n;
    i = 0;
    while (i < W) begin
      if (sw[i]) begin
        j = i;
        while (j + 1 < W && sw[j+1]) j++;
        if (j > i) for (int k = i; k <= j; k++) res[k] = p[k];
        i = j + 1;
      end else begin
        i++;
      end
    end
    return res;
  endfunction

  initial begin
    for (int a = 0; a < 2**W; a++) begin
      for (int b = 0; b < 2**W; b++) begin
        logic [W-1:0] exp_w, sw;
        prev_word = W'(a);
        next_word = W'(b);
        #1;
        exp_w = ref_out(prev_word, next_word);
        checks++;
        if (out_word !== exp_w || flip_mask !== (exp_w ^ next_word) || clean !== 1'b1) begin
          failures++;
          $display("FAIL prev=%b next=%b out=%b mask=%b clean=%b expected %b",
                   prev_word, next_word, out_word, flip_mask, clean, exp_w);
        end
        // Independent property: no two neighbouring wires switch.
        sw = out_word ^ prev_word;
        checks++;
        if ((sw & (sw >> 1)) != 0) begin
          failures++;
          $display("FAIL adjacent switching prev=%b out=%b", prev_word, out_word);
        end
        if (flip_mask != 0) flipped_words++;
        if ($countones(flip_mask) > 2) multi_pair++;
      end
    end
    prev_word = 4'b0111; next_word = 4'b1100;
    #1;
    checks++;
    if (out_word !== 4'b1111) begin
      failures++;
      $display("FAIL example out=%b expected 1111", out_word);
    end
    $display("words flipped=%0d, with more than one pair=%0d", flipped_words, multi_pair);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
