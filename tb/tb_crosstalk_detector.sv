// tb_crosstalk_detector: exhaustive check of the adjacent-pair AND detector
// at WIDTH = 4. For each of the 16 transition patterns the expected pair flags
// are derived by counting switching neighbours, and any_xtalk must be 1
// exactly when some pair switches together.
module tb_crosstalk_detector;
  localparam int W = 4;
  logic [W-1:0] trans;
  logic [W-2:0] xtalk;
  logic         any_xtalk;
  int checks = 0, failures = 0;

  crosstalk_detector #(.WIDTH(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2**W; t++) begin
      bit exp_any;
      trans = W'(t);
      #1;
      exp_any = 0;
      for (int i = 0; i < W - 1; i++) begin
        bit both;
        both = (((t >> i) & 3) == 3);
        exp_any |= both;
        checks++;
        if (xtalk[i] !== both) begin
          failures++;
          $display("FAIL trans=%b pair %0d xtalk=%b", trans, i, xtalk[i]);
        end
      end
      checks++;
      if (any_xtalk !== exp_any) begin
        failures++;
        $display("FAIL trans=%b any_xtalk=%b", trans, any_xtalk);
      end
    end
    // The published example: 0111 -> 1100 switches wires 3, 1 and 0; only
    // pair (1,0) switches together.
    trans = 4'b0111 ^ 4'b1100;
    #1;
    checks++;
    if (xtalk !== 3'b001) begin
      failures++;
      $display("FAIL example xtalk=%b", xtalk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
