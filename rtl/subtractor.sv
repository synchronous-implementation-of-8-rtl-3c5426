// subtractor: 8-bit combinational subtractor, diff_o = a_i - b_i (modulo 2^8).
//
// In the square root computer a_i is the partial remainder and b_i the trial
// value {result,01}; the difference is only used when the comparator has found
// a_i >= b_i, so no borrow output is needed. Purely combinational, no clock.
// The 8-bit width and the purely combinational form follow the original
// design; leaving out a borrow output is this design's choice.
module subtractor
  import sqrt_pkg::*;
(
  input  logic [DATA_W-1:0] a_i,
  input  logic [DATA_W-1:0] b_i,
  output logic [DATA_W-1:0] diff_o
);

  assign diff_o = a_i - b_i;

endmodule
