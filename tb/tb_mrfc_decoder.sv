// tb_mrfc_decoder: checks the weighted-sum MRFC decoder on all 16 words.
// Expected values come from the weights 3,2,1,1 written out here, and the
// eight table code words must decode back to their data words.
module tb_mrfc_decoder;
  import mrfc_pkg::*;
  code_t code;
  data_t data;
  int checks = 0, failures = 0;

  localparam code_t TABLE [8] = '{4'b0000, 4'b0001, 4'b0011, 4'b0110,
                                  4'b0111, 4'b1100, 4'b1101, 4'b1111};

  mrfc_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int exp_v;
      code = code_t'(c);
      #1;
      exp_v = 3 * ((c >> 3) & 1) + 2 * ((c >> 2) & 1) + ((c >> 1) & 1) + (c & 1);
      checks++;
      if (int'(data) != exp_v) begin
        failures++;
        $display("FAIL code=%b data=%0d expected %0d", code, data, exp_v);
      end
    end
    for (int d = 0; d < 8; d++) begin
      code = TABLE[d];
      #1;
      checks++;
      if (int'(data) != d) begin
        failures++;
        $display("FAIL table code=%b data=%0d expected %0d", code, data, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
