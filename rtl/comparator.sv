// comparator: 8-bit combinational magnitude comparator.
//
// smaller_o is high when the unsigned input a_i is smaller than b_i. In the
// square root computer it tells the controller that the trial value
// {result,01} does not fit into the partial remainder, so the next result bit
// is 0. Purely combinational, no clock. Width, output name and meaning follow
// the original design.
module comparator
  import sqrt_pkg::*;
(
  input  logic [DATA_W-1:0] a_i,
  input  logic [DATA_W-1:0] b_i,
  output logic              smaller_o
);

  assign smaller_o = (a_i < b_i);

endmodule
