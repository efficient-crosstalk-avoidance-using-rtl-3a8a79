// tb_mrfc_encoder: drives the data words 000..111 in order (as in the
// published code-generation waveform) and then random words with gaps, and
// checks that each code word appears exactly one clock after its data word,
// matches the published 3-bit MRFC table and holds while no word is valid.
module tb_mrfc_encoder;
  import mrfc_pkg::*;
  logic  clk = 0, rst = 1, in_valid = 0;
  data_t in_data = '0;
  logic  code_valid;
  code_t code;
  int checks = 0, failures = 0;

  localparam code_t TABLE [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110,
                                  4'b0111, 4'b1100, 4'b1101, 4'b1111};

  mrfc_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit exp_valid, input code_t exp_code);
    checks++;
    if (code_valid !== exp_valid || code !== exp_code) begin
      failures++;
      $display("FAIL t=%0t code_valid=%b code=%b expected %b/%b", $time, code_valid, code, exp_valid, exp_code);
    end
  endtask

  initial begin
    code_t last;
    @(posedge clk); @(posedge clk);
    #1 rst = 0;
    check(1'b0, 4'b0000);
    last = 4'b0000;
    // Sequential sweep, one word per cycle: latency exactly one clock.
    for (int d = 0; d < 8; d++) begin
      in_valid = 1; in_data = data_t'(d);
      @(posedge clk); #1;
      check(1'b1, TABLE[d]);
      last = TABLE[d];
    end
    // Random words with idle gaps.
    for (int n = 0; n < 300; n++) begin
      bit v;
      v = ($urandom_range(0, 3) != 0);
      in_valid = v; in_data = data_t'($urandom_range(0, 7));
      if (v) last = TABLE[in_data];
      @(posedge clk); #1;
      check(v, last);
    end
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
