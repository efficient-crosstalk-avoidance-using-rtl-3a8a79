// mrfc_encoder: 3-bit data word to 4-bit Modified Redundant Fibonacci code.
//
// The data word is registered on the clock edge and the registered word is
// mapped to its MRFC code word by a fixed table (weights 3,2,1,1):
//
//   data 000 001 010 011 100 101 110 111
//   code 0000 0001 0011 0110 0111 1100 1101 1111
//
// The table is the published 3-bit MRFC code. Registering the data (three
// flip-flops plus a valid bit) and decoding it after the register gives the
// one-cycle delay between a data word and its code word that the published
// code-generation waveform shows; that placement of the register, the valid
// bit and the synchronous active-high reset (clearing to data 000, code
// 0000) are this design's choices.
//
// Interface: in_valid/in_data are sampled on each rising edge of clk;
// code_valid/code follow one cycle later and hold until the next valid word.
module mrfc_encoder
  import mrfc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  data_t in_data,
  output logic  code_valid,
  output code_t code
);

  data_t data_q;
  logic  valid_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_q  <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) data_q <= in_data;
    end
  end

  always_comb begin
    unique case (data_q)
      3'd0:    code = 4'b0000;
      3'd1:    code = 4'b0001;
      3'd2:    code = 4'b0011;
      3'd3:    code = 4'b0110;
      3'd4:    code = 4'b0111;
      3'd5:    code = 4'b1100;
      3'd6:    code = 4'b1101;
      default: code = 4'b1111;
    endcase
  end

  assign code_valid = valid_q;

endmodule
