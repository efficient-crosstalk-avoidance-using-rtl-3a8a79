// mrfc_pkg: sizes and types shared by the MRFC crosstalk-avoidance CODEC.
//
// The CODEC carries 3-bit data words over a 4-wire bus. Each data word is
// sent as a Modified Redundant Fibonacci Code (MRFC) word whose bits carry
// the weights 3, 2, 1 and 1 (most significant wire first), so a code word
// d3 d2 d1 d0 stands for the value 3*d3 + 2*d2 + d1 + d0. The 3-bit data width,
// the 4-bit code width and the weights follow the published 3-bit MRFC table;
// nothing in this package has timing.
package mrfc_pkg;

  localparam int unsigned DATA_W = 3;
  localparam int unsigned CODE_W = 4;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [CODE_W-1:0] code_t;

  // Weight of each code bit, index = wire number (wire 0 is the LSB).
  localparam int unsigned MRFC_WEIGHT [CODE_W] = '{1, 1, 2, 3};

endpackage
